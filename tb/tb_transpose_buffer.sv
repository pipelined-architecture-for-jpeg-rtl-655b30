// tb_transpose_buffer: writes 8x8 blocks of known values (row-major) back to back and with
// gaps, and checks that each block comes out column by column (sample n = element
// (n mod 8, n / 8)), in block order, with no block lost, and that the first sample of a block
// appears two cycles after its last write when the buffer is idle.
module tb_transpose_buffer;
  logic clk = 0, rst_n = 0, ce = 1, in_valid = 0;
  logic [12:0] in_data = 0;
  logic out_valid;
  logic [12:0] out_data;
  always #5 clk = ~clk;

  transpose_buffer #(.W(13)) dut (.*);

  int checks = 0, failures = 0;
  logic [12:0] exp_q [$];

  always @(posedge clk) if (rst_n && ce && out_valid) begin
    logic [12:0] e;
    e = exp_q.pop_front();
    checks++;
    if (out_data !== e) begin
      failures++;
      if (failures < 10) $display("FAIL: got %0d expected %0d", out_data, e);
    end
  end

  task automatic send_block(input int b, input bit gaps);
    logic [12:0] m [64];
    for (int i = 0; i < 64; i++) m[i] = 13'(b * 64 + i);
    for (int n = 0; n < 64; n++) exp_q.push_back(m[8 * (n % 8) + n / 8]);
    for (int i = 0; i < 64; i++) begin
      bit c;
      do begin
        c = stall_en ? ($urandom_range(0, 5) != 0) : 1'b1;
        ce <= c; in_valid <= 1; in_data <= m[i];
        @(posedge clk);
      end while (!c);
      if (gaps && $urandom_range(0, 2) == 0) begin
        ce <= 1; in_valid <= 0;
        @(posedge clk);
      end
    end
  endtask

  bit stall_en = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send_block(0, 0);
    in_valid <= 0;
    // latency: last write at edge E-1 (set before), data registered at E+1
    #1 checks++;
    if (out_valid) begin failures++; $display("FAIL: output too early"); end
    @(posedge clk); #1 checks++;
    if (!out_valid) begin failures++; $display("FAIL: output not valid 2 cycles after block"); end
    repeat (70) @(posedge clk);
    // back-to-back blocks: writes continuous, reads must keep up
    for (int b = 1; b < 20; b++) begin
      stall_en = (b > 5);          // enable gaps stall everything at once
      send_block(b, b > 10);
    end
    stall_en = 0;
    ce <= 1; in_valid <= 0;
    repeat (140) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
