// tb_host_if: checks the register map: reset sizes 640 x 480, WIDTH/HEIGHT write and read
// back, STATUS mirrors busy/done, a CTRL write of 1 gives a one-cycle start only when not busy,
// size writes are ignored while busy, and quantization writes to 0x40..0x7F appear on the
// table port with the right index and value while other addresses do not.
module tb_host_if;
  logic clk = 0, rst_n = 0;
  logic [7:0] hp_addr = 0;
  logic hp_wr = 0;
  logic [31:0] hp_wdata = 0, hp_rdata;
  logic start, qwr_en, busy = 0, done = 0;
  logic [15:0] img_width, img_height;
  logic [5:0] qwr_addr;
  logic [7:0] qwr_data;
  always #5 clk = ~clk;

  host_if dut (.*);

  int checks = 0, failures = 0, n_start = 0, n_q = 0, q_bad = 0;

  always @(posedge clk) if (rst_n) begin
    if (start) n_start++;
    if (qwr_en) begin
      n_q++;
      if (int'(qwr_data) != (int'(qwr_addr) * 3 + 1) % 256 || hp_addr != 8'h40 + 8'(qwr_addr)) q_bad++;
    end
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    #1 hp_addr = a; hp_wdata = d; hp_wr = 1;
    @(posedge clk);
    #1 hp_wr = 0;
  endtask

  task automatic rd_check(input logic [7:0] a, input logic [31:0] e, input string what);
    #1 hp_addr = a; hp_wr = 0;
    #1 checks++;
    if (hp_rdata != e) begin failures++; $display("FAIL: %s: got %0h expected %0h", what, hp_rdata, e); end
  endtask

  task automatic expect_eq(input int got, input int e, input string what);
    checks++;
    if (got != e) begin failures++; $display("FAIL: %s: got %0d expected %0d", what, got, e); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    rd_check(8'h02, 640, "reset width");
    rd_check(8'h03, 480, "reset height");
    wr(8'h02, 32'hABCD0100);
    wr(8'h03, 32'h00000040);
    rd_check(8'h02, 32'h0100, "width");
    rd_check(8'h03, 32'h0040, "height");
    expect_eq(img_width, 256, "width port");
    for (int i = 0; i < 64; i++) wr(8'h40 + 8'(i), (i * 3 + 1) % 256);
    wr(8'h80, 5);                     // outside the table
    wr(8'h3F, 5);
    expect_eq(n_q, 64, "table writes");
    expect_eq(q_bad, 0, "table write contents");
    rd_check(8'h01, 0, "status idle");
    wr(8'h00, 0);                     // bit 0 clear: no start
    expect_eq(n_start, 0, "no start on 0");
    wr(8'h00, 1);
    expect_eq(n_start, 1, "one start");
    busy = 1;
    rd_check(8'h01, 1, "status busy");
    wr(8'h00, 1);                     // ignored while busy
    wr(8'h02, 16);                    // ignored while busy
    expect_eq(n_start, 1, "start ignored while busy");
    rd_check(8'h02, 256, "width kept while busy");
    busy = 0; done = 1;
    rd_check(8'h01, 2, "status done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
