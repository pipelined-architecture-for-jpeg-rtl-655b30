// ctrl_sm: pipeline controller. Walks the image in 16x8 data units and feeds the pipeline.
//
// For every band of 8 lines (once the line buffer has it), for every 16x8 data unit left to
// right, it fetches four 8x8 blocks in the order Y1 (left 8 columns), Y2 (right 8 columns),
// Cb, Cr, each row by row, one sample per enabled cycle. For a Y block it reads the pixel pair
// holding the wanted pixel and tells the converter which pixel to use; for a Cb or Cr block it
// reads the pair x = 2c, 2c+1 that the converter averages into chroma column c. Down sampling
// is thus only addressing, as the design says. At the first sample of each block it pushes the
// block's tag (component, last block of image) into the tag FIFO read by the run-length
// encoder. After the band's last sample it frees the band. When all blocks are fetched it
// waits for the entropy back end to go idle, then reports done.
//
// Interface: start (one cycle, from the host interface) clears the pipeline state ('clear')
// and begins an image of img_width x img_height pixels (multiples of 16 and 8). ce is the
// pipeline-wide enable: with ce low nothing advances. cc_* are the converter controls,
// registered so they line up with the line buffer's registered read data.
module ctrl_sm
  import jpeg_pkg::*;
#(
  parameter int unsigned MAX_WIDTH = 640
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] img_width,
  input  logic [15:0] img_height,
  input  logic        ce,
  // line buffer
  input  logic        band_ready,
  output logic        rd_en,
  output logic [2:0]  rd_line,
  output logic [$clog2(MAX_WIDTH/2)-1:0] rd_pair,
  output logic        band_release,
  // colour converter controls, aligned with the line buffer data
  output logic        cc_valid,
  output comp_e       cc_comp,
  output logic        cc_pix_sel,
  // block tags for the run-length encoder
  output logic        tag_wr,
  output blk_tag_t    tag_data,
  input  logic        tag_full,
  // back end
  input  logic        pipe_idle,
  output logic        clear,
  output logic        busy,
  output logic        done
);

  localparam int unsigned PW = $clog2(MAX_WIDTH/2);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_DRAIN} state_e;
  state_e state;

  logic [12:0] band, du;
  logic [1:0]  blk;
  logic [2:0]  r, c;
  logic        issue, last_du, last_band, last_in_band;

  assign last_du      = (du == 13'(img_width >> 4) - 13'd1);
  assign last_band    = (band == 13'(img_height >> 3) - 13'd1);
  assign last_in_band = last_du && blk == 2'd3 && r == 3'd7 && c == 3'd7;
  assign issue        = (state == S_FETCH) && ce && band_ready;

  assign clear        = start;
  assign rd_en        = issue;
  assign rd_line      = r;
  always_comb begin
    case (blk)
      2'd0:    rd_pair = PW'({du, 3'd0}) + PW'(c[2:1]);
      2'd1:    rd_pair = PW'({du, 3'd0}) + PW'(4) + PW'(c[2:1]);
      default: rd_pair = PW'({du, 3'd0}) + PW'(c);
    endcase
  end
  assign band_release = issue && last_in_band;
  assign tag_wr       = issue && r == 3'd0 && c == 3'd0;
  assign tag_data     = '{comp: (blk == 2'd2) ? COMP_CB : (blk == 2'd3) ? COMP_CR : COMP_Y,
                          last_img: last_band && last_du && blk == 2'd3};
  assign busy         = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; band <= '0; du <= '0; blk <= '0; r <= '0; c <= '0; done <= 1'b0;
      cc_valid <= 1'b0; cc_comp <= COMP_Y; cc_pix_sel <= 1'b0;
    end else begin
      if (ce) begin
        cc_valid   <= issue;
        cc_comp    <= tag_data.comp;
        cc_pix_sel <= c[0];
      end
      case (state)
        S_IDLE: if (start) begin
          state <= S_FETCH; band <= '0; du <= '0; blk <= '0; r <= '0; c <= '0; done <= 1'b0;
        end
        S_FETCH: if (issue) begin
          c <= c + 3'd1;
          if (c == 3'd7) begin
            r <= r + 3'd1;
            if (r == 3'd7) begin
              blk <= blk + 2'd1;
              if (blk == 2'd3) begin
                du <= last_du ? '0 : du + 13'd1;
                if (last_du) begin
                  band <= band + 13'd1;
                  if (last_band) state <= S_DRAIN;
                end
              end
            end
          end
        end
        S_DRAIN: if (pipe_idle) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_tag_room: assert property (@(posedge clk) disable iff (!rst_n) tag_wr |-> !tag_full);

endmodule
