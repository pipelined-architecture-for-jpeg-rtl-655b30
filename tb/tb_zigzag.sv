// tb_zigzag: sends 8x8 blocks in the column-by-column order of the DCT (sample n is element
// (row n mod 8, column n / 8)) and checks that they leave in zig-zag order with the right
// position index, using an independent zig-zag walk of the block (not the table), back to back
// and with enable gaps.
module tb_zigzag;
  logic clk = 0, rst_n = 0, ce = 1, in_valid = 0;
  logic [11:0] in_data = 0;
  logic out_valid;
  logic [5:0] out_pos;
  logic [11:0] out_data;
  always #5 clk = ~clk;

  zigzag #(.W(12)) dut (.*);

  int checks = 0, failures = 0;
  logic [11:0] exp_q [$];
  int pos_exp = 0;

  always @(posedge clk) if (rst_n && ce && out_valid) begin
    logic [11:0] e;
    e = exp_q.pop_front();
    checks++;
    if (out_data !== e || out_pos != 6'(pos_exp)) begin
      failures++;
      if (failures < 10) $display("FAIL: got %0d@%0d expected %0d@%0d", out_data, out_pos, e, pos_exp);
    end
    pos_exp = (pos_exp + 1) % 64;
  end

  // natural indices (8*row + col) in zig-zag order, by walking the anti-diagonals
  function automatic void zz_walk(output int order [64]);
    int k;
    k = 0;
    for (int d = 0; d < 15; d++)
      for (int i = 0; i <= d; i++) begin
        int r, c;
        if (d % 2 == 0) begin r = d - i; c = i; end   // even diagonal: going up-right
        else            begin r = i; c = d - i; end   // odd diagonal: going down-left
        if (r < 8 && c < 8) begin order[k] = 8 * r + c; k++; end
      end
  endfunction

  bit stall_en = 0;
  task automatic send_block(input int b);
    int order [64];
    logic [11:0] m [64];
    zz_walk(order);
    for (int i = 0; i < 64; i++) m[i] = 12'(b * 64 + i);      // m[8*row+col]
    for (int k = 0; k < 64; k++) exp_q.push_back(m[order[k]]);
    for (int n = 0; n < 64; n++) begin
      bit c;
      do begin
        c = stall_en ? ($urandom_range(0, 4) != 0) : 1'b1;
        ce <= c; in_valid <= 1; in_data <= m[8 * (n % 8) + n / 8];
        @(posedge clk);
      end while (!c);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < 30; b++) begin
      stall_en = (b >= 15);
      send_block(b);
    end
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
