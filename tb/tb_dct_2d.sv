// tb_dct_2d: checks the level-shifted 2-D DCT against a floating-point JPEG forward DCT,
// tolerance 1, for flat, extreme and random 8x8 blocks sent back to back and with random
// enable gaps. Output order is column by column (sample n = F(n mod 8, n / 8)). Also checks
// the latency of 19 cycles from a block's last input to its first output when idle.
module tb_dct_2d;
  import jpeg_pkg::*;
  import tb_jpeg_ref_pkg::*;

  logic clk = 0, rst_n = 0, ce = 1, in_valid = 0;
  logic [7:0] in_sample = 0;
  logic out_valid;
  logic signed [11:0] out_coef;
  always #5 clk = ~clk;

  dct_2d dut (.*);

  int checks = 0, failures = 0, worst = 0;
  real exp_q [$];
  int cycle = 0, t_last_in = 0, t_first_out = -1;
  always @(posedge clk) cycle++;

  always @(posedge clk) if (rst_n && ce && out_valid) begin
    real e, d;
    e = exp_q.pop_front();
    d = real'(out_coef) - e;
    if (t_first_out < 0) t_first_out = cycle;
    checks++;
    if (d > 1.0 || d < -1.0) begin
      failures++;
      if (failures < 10) $display("FAIL: got %0d expected %f", out_coef, e);
    end
  end

  bit stall_en = 0;
  task automatic send_block(input int s [64]);
    real f [64];
    fdct(s, f);
    for (int n = 0; n < 64; n++) exp_q.push_back(f[8 * (n % 8) + n / 8]);
    for (int i = 0; i < 64; i++) begin
      bit c;
      do begin
        c = stall_en ? ($urandom_range(0, 4) != 0) : 1'b1;
        ce <= c; in_valid <= 1; in_sample <= 8'(s[i]);
        @(posedge clk);
      end while (!c);
    end
  endtask

  initial begin
    int s [64];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 64; i++) s[i] = 255;
    send_block(s);
    t_last_in = cycle;
    in_valid <= 0;
    repeat (80) @(posedge clk);
    checks++;
    if (t_first_out - t_last_in != 19) begin
      failures++; $display("FAIL: latency %0d", t_first_out - t_last_in);
    end
    for (int b = 0; b < 60; b++) begin
      for (int i = 0; i < 64; i++)
        case (b % 4)
          0: s[i] = $urandom_range(0, 255);
          1: s[i] = ((i / 8 + i % 8) % 2) ? 255 : 0;
          2: s[i] = (i % 8) * 32;
          default: s[i] = 0;
        endcase
      stall_en = (b >= 30);
      send_block(s);
    end
    ce <= 1; in_valid <= 0;
    repeat (250) @(posedge clk);
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
