// tb_double_fifo: a producer writes blocks of varying length (1..40 entries, the last one
// marked) and a consumer reads with random stalls; checks that every entry comes out once, in
// order, with its block-end mark; that the writer and reader switch FIFOs after marked
// entries (while one FIFO is read the other is written); and that full stops the producer.
module tb_double_fifo;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_last = 0, rd_en;
  logic [7:0] wr_data = 0, rd_data;
  logic full, rd_last, empty, all_empty;
  always #5 clk = ~clk;

  double_fifo #(.W(8), .DEPTH(16)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_overlap = 0;
  logic [8:0] exp_q [$];
  bit rd_go = 0;

  assign rd_en = rd_go && !empty;

  always @(posedge clk) if (rst_n) begin
    if (rd_en) begin
      logic [8:0] e;
      e = exp_q.pop_front();
      checks++;
      if ({rd_last, rd_data} !== e) begin
        failures++;
        if (failures < 10) $display("FAIL: got %0d/%0d expected %0d/%0d", rd_last, rd_data, e[8], e[7:0]);
      end
    end
    if (full) n_full++;
    if (wr_en && rd_en && dut.wsel != dut.rsel) n_overlap++;
    rd_go <= ($urandom_range(0, 3) == 0);
  end

  initial begin
    int v;
    v = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < 200; b++) begin
      int len;
      len = (b % 10 == 0) ? 40 : $urandom_range(1, 12);
      for (int i = 0; i < len; i++) begin
        // decide between edges, when full is stable
        #1;
        while (full) begin wr_en = 0; @(posedge clk); #1; end
        wr_en = 1; wr_data = 8'(v); wr_last = (i == len - 1);
        exp_q.push_back({1'(i == len - 1), 8'(v)});
        v++;
        @(posedge clk);
      end
      #1 wr_en = 0;
      if ($urandom_range(0, 1) == 0) @(posedge clk);
    end
    wr_en = 0;
    repeat (3000) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || !all_empty) begin failures++; $display("FAIL: %0d entries missing", exp_q.size()); end
    checks++;
    if (n_full == 0 || n_overlap == 0) begin failures++; $display("FAIL: full %0d overlap %0d", n_full, n_overlap); end
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
