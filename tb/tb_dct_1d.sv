// tb_dct_1d: checks the 8-point DCT unit (first-pass configuration: 8-bit signed in, result
// with two fraction bits) against a floating-point 1-D DCT, tolerance 1 LSB, for random and
// extreme vectors sent with random gaps and random enable. Also checks that the first output
// of a group appears on the enabled cycle after its eighth input.
module tb_dct_1d;
  logic clk = 0, rst_n = 0, ce = 1, in_valid = 0;
  logic signed [7:0] in_data = 0;
  logic out_valid;
  logic signed [12:0] out_data;
  always #5 clk = ~clk;

  dct_1d #(.IN_W(8), .OUT_W(13), .SHIFT(10)) dut (.*);

  int checks = 0, failures = 0;
  real exp_q [$];

  always @(posedge clk) if (rst_n && ce && out_valid) begin
    real e, d;
    e = exp_q.pop_front();
    d = real'(out_data) - e;
    checks++;
    if (d > 1.0 || d < -1.0) begin
      failures++;
      if (failures < 10) $display("FAIL: got %0d expected %f", out_data, e);
    end
  end

  task automatic send_vec(input int x [8], input bit gaps);
    for (int u = 0; u < 8; u++) begin
      real acc;
      acc = 0.0;
      for (int k = 0; k < 8; k++)
        acc += real'(x[k]) * $cos((2.0 * k + 1.0) * u * 3.14159265358979 / 16.0);
      acc = acc * 0.5 * ((u == 0) ? 1.0 / $sqrt(2.0) : 1.0);
      exp_q.push_back(acc * 4.0);     // two fraction bits
    end
    for (int k = 0; k < 8; k++) begin
      @(posedge clk);
      in_valid <= 1; in_data <= 8'(x[k]);
      ce <= gaps ? ($urandom_range(0, 4) != 0) : 1'b1;
      #1;
      while (!ce) begin
        @(posedge clk);
        ce <= ($urandom_range(0, 4) != 0);
        #1;
      end
      if (gaps && $urandom_range(0, 3) == 0) begin
        @(posedge clk); in_valid <= 0; ce <= 1;
      end
    end
    @(posedge clk); in_valid <= 0; ce <= 1;
  endtask

  initial begin
    int x [8];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 8; k++) x[k] = 127;
    send_vec(x, 0);
    for (int k = 0; k < 8; k++) x[k] = (k % 2) ? -128 : 127;
    send_vec(x, 0);
    // timing: eighth input at edge E, output valid right after E
    for (int k = 0; k < 8; k++) x[k] = k * 10 - 40;
    send_vec(x, 0);
    #1 checks++;
    if (!out_valid) begin failures++; $display("FAIL: output not valid after 8th input"); end
    for (int n = 0; n < 400; n++) begin
      for (int k = 0; k < 8; k++) x[k] = $urandom_range(0, 255) - 128;
      send_vec(x, n % 2);
    end
    repeat (12) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
