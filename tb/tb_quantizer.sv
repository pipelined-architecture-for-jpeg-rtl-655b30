// tb_quantizer: programs a quantization table through the host write port (including the
// edge entries 1 and 255), sends coefficients with their zig-zag positions and checks
// ROUND(in / q) (ties away from zero, result saturated to 12 bits) computed with integer
// arithmetic in the testbench, with enable gaps. Also checks the 15-cycle latency.
module tb_quantizer;
  logic clk = 0, rst_n = 0, ce = 1, in_valid = 0;
  logic [5:0] in_pos = 0;
  logic signed [11:0] in_data = 0;
  logic out_valid;
  logic [5:0] out_pos;
  logic signed [11:0] out_data;
  logic qwr_en = 0;
  logic [5:0] qwr_addr = 0;
  logic [7:0] qwr_data = 0;
  always #5 clk = ~clk;

  quantizer dut (.*);

  int checks = 0, failures = 0;
  int q [64];
  int exp_q [$];
  int pos_q [$];
  int cycle = 0, t_in = -1, t_out = -1;
  always @(posedge clk) begin
    if (rst_n && in_valid && ce && t_in < 0) t_in = cycle;
    if (rst_n && out_valid && t_out < 0) t_out = cycle;
    cycle++;
  end

  function automatic int ref_q(int x, int d);
    int a, r;
    a = (x < 0) ? -x : x;
    r = (2 * a + d) / (2 * d);
    if (r > 2047) r = 2047;
    return (x < 0) ? -r : r;
  endfunction

  always @(posedge clk) if (rst_n && ce && out_valid) begin
    int e, p;
    e = exp_q.pop_front();
    p = pos_q.pop_front();
    checks++;
    if (int'(out_data) != e || int'(out_pos) != p) begin
      failures++;
      if (failures < 10) $display("FAIL: got %0d@%0d expected %0d@%0d", out_data, out_pos, e, p);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 64; i++) begin
      q[i] = (i == 0) ? 1 : (i == 1) ? 255 : (i == 2) ? 2 : $urandom_range(1, 255);
      @(posedge clk); qwr_en <= 1; qwr_addr <= 6'(i); qwr_data <= 8'(q[i]);
    end
    @(posedge clk); qwr_en <= 0;
    // latency
    @(posedge clk); in_valid <= 1; in_pos <= 6'd5; in_data <= 12'sd100;
    exp_q.push_back(ref_q(100, q[5])); pos_q.push_back(5);
    @(posedge clk); in_valid <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (t_out - t_in != 15) begin failures++; $display("FAIL: latency %0d", t_out - t_in); end
    for (int n = 0; n < 3000; n++) begin
      bit c;
      int x, p;
      p = n % 64;
      x = (n < 64) ? ((n % 2) ? -2048 : 2047) : $urandom_range(0, 4095) - 2048;
      if (n % 7 == 3) x = ((2 * $urandom_range(0, 20) + 1) * q[p] / 2) % 2048;  // exact halves
      if (n % 11 == 5 && n >= 64) x = -x;
      exp_q.push_back(ref_q(x, q[p])); pos_q.push_back(p);
      do begin
        c = (n > 1500) ? ($urandom_range(0, 3) != 0) : 1'b1;
        ce <= c; in_valid <= 1; in_pos <= 6'(p); in_data <= 12'(x);
        @(posedge clk);
      end while (!c);
    end
    ce <= 1; in_valid <= 0;
    repeat (30) @(posedge clk);
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
