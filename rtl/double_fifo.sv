// double_fifo: two FIFOs used as a double buffer between a block producer and its consumer.
//
// The writer fills FIFO 'wsel' and switches to the other FIFO after writing an entry marked
// wr_last (the end of a block); the reader drains FIFO 'rsel' and switches after reading an
// entry marked last. So while the producer writes block k+1 into one FIFO, the consumer can
// read block k from the other, which is the double-buffering the design describes. Entries
// keep their order: each FIFO stays first-in first-out, and both sides switch at the same
// marks. A FIFO rather than a RAM is used because the number of entries per block varies.
//
// Interface: first-word-fall-through read (rd_data/rd_last valid while empty is low).
// full and empty refer to the FIFO currently selected by the writer and the reader.
// Each FIFO holds DEPTH entries (DEPTH a power of two).
module double_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         wr_last,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         rd_last,
  output logic         empty,
  output logic         all_empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W:0]    mem [2][DEPTH];
  logic [AW-1:0] wp  [2];
  logic [AW-1:0] rp  [2];
  logic [AW:0]   cnt [2];
  logic          wsel, rsel;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wsel][wp[wsel]] <= {wr_last, wr_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel <= 1'b0; rsel <= 1'b0;
      for (int i = 0; i < 2; i++) begin wp[i] <= '0; rp[i] <= '0; cnt[i] <= '0; end
    end else begin
      for (int i = 0; i < 2; i++) begin
        logic wi, ri;
        wi = wr_en && (wsel == 1'(i));
        ri = rd_en && (rsel == 1'(i));
        if (wi) wp[i] <= wp[i] + AW'(1);
        if (ri) rp[i] <= rp[i] + AW'(1);
        cnt[i] <= cnt[i] + (AW+1)'(wi) - (AW+1)'(ri);
      end
      if (wr_en && wr_last) wsel <= ~wsel;
      if (rd_en && rd_last) rsel <= ~rsel;
    end
  end

  assign full      = (cnt[wsel] == (AW+1)'(DEPTH));
  assign empty     = (cnt[rsel] == '0);
  assign all_empty = (cnt[0] == '0) && (cnt[1] == '0);
  assign {rd_last, rd_data} = mem[rsel][rp[rsel]];

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty);

endmodule
