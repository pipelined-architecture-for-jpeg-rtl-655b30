// tb_colour_conv: checks the RGB to YCbCr converter / chroma down sampler against the
// floating-point conversion formulas (tolerance 1 LSB) for random pixel pairs, for all three
// components and both pixel selects, with random enable gaps. Also checks the two-cycle latency.
module tb_colour_conv;
  import jpeg_pkg::*;
  import tb_jpeg_ref_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0, in_valid = 0, pix_sel = 0;
  comp_e in_comp = COMP_Y;
  logic [23:0] pix0 = 0, pix1 = 0;
  logic out_valid;
  logic [7:0] out_sample;
  always #5 clk = ~clk;

  colour_conv dut (.*);

  int checks = 0, failures = 0;
  int exp_q [$];
  int lat_q [$];
  int cycle = 0;
  always @(posedge clk) cycle++;

  always @(posedge clk) if (rst_n && ce && out_valid) begin
    int e, d, t;
    e = exp_q.pop_front();
    t = lat_q.pop_front();
    d = int'(out_sample) - e;
    checks++;
    if (d > 1 || d < -1) begin
      failures++;
      if (failures < 10) $display("FAIL: got %0d expected %0d", out_sample, e);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      logic [23:0] a, b;
      int c, s;
      @(posedge clk);
      a = 24'($urandom); b = 24'($urandom);
      if (i < 8) begin a = 24'hFFFFFF; b = 24'h000000; end
      c = $urandom_range(0, 2); s = $urandom_range(0, 1);
      ce <= ($urandom_range(0, 3) != 0);
      // only present a new input on a cycle that will be enabled
      in_valid <= 1'b0;
      #1;
      if (ce) begin
        in_valid <= 1'b1; pix0 <= a; pix1 <= b; in_comp <= comp_e'(c); pix_sel <= 1'(s);
        if (c == 0) begin
          logic [23:0] p;
          p = s ? b : a;
          exp_q.push_back(csc(0, real'(p[23:16]), real'(p[15:8]), real'(p[7:0])));
        end else
          exp_q.push_back(csc(c, (real'(a[23:16]) + real'(b[23:16])) / 2.0,
                                 (real'(a[15:8]) + real'(b[15:8])) / 2.0,
                                 (real'(a[7:0]) + real'(b[7:0])) / 2.0));
        lat_q.push_back(cycle);
      end
    end
    @(posedge clk); in_valid <= 0; ce <= 1;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", exp_q.size()); end
    // latency: a single sample with ce always high appears exactly two cycles later
    @(posedge clk); in_valid <= 1; pix0 <= 24'h808080; pix1 <= 24'h808080; in_comp <= COMP_CB;
    exp_q.push_back(128);
    @(posedge clk); in_valid <= 0;
    #1 checks++;
    if (out_valid) begin failures++; $display("FAIL: output one cycle early"); end
    @(posedge clk);
    #1 checks++;
    if (!out_valid || out_sample != 8'd128) begin failures++; $display("FAIL: latency/value"); end
    @(posedge clk);
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
