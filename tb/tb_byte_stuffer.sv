// tb_byte_stuffer: feeds random bytes (a quarter of them 0xFF, including runs of 0xFF) from a
// first-word-fall-through source with random gaps, throttles out_ready at random, and checks
// that the output equals the input with a 0x00 inserted after every 0xFF, that an output byte
// is held while not accepted, and that idle is high at the end.
module tb_byte_stuffer;
  logic clk = 0, rst_n = 0;
  logic [7:0] in_data = 0, out_data;
  logic in_empty = 1, in_rd, out_valid, out_ready = 0, idle, ev_stuff;
  always #5 clk = ~clk;

  byte_stuffer dut (.*);

  int checks = 0, failures = 0;
  byte unsigned src [$];
  byte unsigned exp_q [$];
  bit go = 0;
  logic [7:0] held;
  bit was_stalled = 0;

  always @(posedge clk) begin
    if (rst_n && in_rd) void'(src.pop_front());
    if (rst_n && out_valid && out_ready) begin
      byte unsigned e;
      e = exp_q.pop_front();
      checks++;
      if (out_data != e) begin
        failures++;
        if (failures < 10) $display("FAIL: got %02x expected %02x", out_data, e);
      end
    end
    if (rst_n && was_stalled) begin
      checks++;
      if (!out_valid || out_data != held) begin failures++; $display("FAIL: output not held"); end
    end
    was_stalled = rst_n && out_valid && !out_ready;
    held = out_data;
    #1;
    in_empty = !go || src.size() == 0 || ($urandom_range(0, 4) == 0);
    if (src.size() != 0) in_data = src[0];
    out_ready = ($urandom_range(0, 2) != 0);
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      byte unsigned b;
      b = ($urandom_range(0, 3) == 0 || (i > 100 && i < 110)) ? 8'hFF : 8'($urandom);
      src.push_back(b);
      exp_q.push_back(b);
      if (b == 8'hFF) exp_q.push_back(8'h00);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    go = 1;
    wait (src.size() == 0);
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || !idle) begin failures++; $display("FAIL: %0d bytes missing", exp_q.size()); end
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
