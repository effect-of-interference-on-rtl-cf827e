// adm2d_decoder: receiver of the two-dimensional intraframe delta modulator.
//
// For every received symbol the direction bit says which neighbour the
// encoder continued from: the previous pixel of the line (held in registers)
// or the pixel above (held in a one-line memory). The delta bit is applied to
// that neighbour's state with the same step rule and estimate update as the
// encoder (adm_update), giving the same reconstructed pixel and state, which
// are kept for the next pixel and the line below exactly as in the encoder.
// The first pixel of a frame starts from the all-zero state, as in the
// encoder.
//
// Interface: one symbol per rising clk edge with rx.valid high, carrying
// the line and frame marks sent by the encoder. pix and pix_valid are
// registered: latency one clock.
module adm2d_decoder
  import adm_pkg::*;
#(
  parameter int unsigned VIDEO_W  = adm_pkg::ADM_VIDEO_W,
  parameter int unsigned YMIN     = adm_pkg::ADM_YMIN,
  parameter int unsigned YMAX     = adm_pkg::ADM_YMAX,
  parameter int unsigned LINE_LEN = adm_pkg::ADM_LINE_LEN
) (
  input  logic               clk,
  input  logic               rst_n,
  input  adm2d_sym_t         rx,
  output logic               pix_valid,
  output logic [VIDEO_W-1:0] pix
);

  localparam int unsigned STEP_W = $clog2(YMAX + 1);
  localparam int unsigned ST_W   = VIDEO_W + STEP_W + 1;
  localparam int unsigned ADDR_W = $clog2(LINE_LEN);

  logic [ADDR_W-1:0] col_q, col;
  assign col = rx.sol ? '0 : col_q;

  logic [VIDEO_W-1:0] hx_q, vx, x_s, x_new;
  logic [STEP_W-1:0]  hy_q, vy, y_s, y_new;
  logic               he_q, ve, e_s;
  logic [ST_W-1:0]    v_rd;

  assign {vx, vy, ve} = v_rd;

  always_comb begin
    if (rx.dir == DIR_V) begin
      x_s = vx; y_s = vy; e_s = ve;
    end else if (rx.sof) begin
      x_s = '0; y_s = '0; e_s = 1'b0;
    end else begin
      x_s = hx_q; y_s = hy_q; e_s = he_q;
    end
  end

  adm_update #(.VIDEO_W(VIDEO_W), .YMIN(YMIN), .YMAX(YMAX), .STEP_W(STEP_W)) u_dm (
    .x(x_s), .y(y_s), .e(e_s), .e_new(rx.e), .x_new(x_new), .y_new(y_new)
  );

  line_store #(.LINE_LEN(LINE_LEN), .WIDTH(ST_W), .ADDR_W(ADDR_W)) u_line (
    .clk(clk), .we(rx.valid), .addr(col), .wdata({x_new, y_new, rx.e}), .rdata(v_rd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q     <= '0;
      hx_q      <= '0;
      hy_q      <= '0;
      he_q      <= 1'b0;
      pix_valid <= 1'b0;
      pix       <= '0;
    end else begin
      pix_valid <= rx.valid;
      if (rx.valid) begin
        col_q <= col + 1'b1;
        hx_q  <= x_new;
        hy_q  <= y_new;
        he_q  <= rx.e;
        pix   <= x_new;
      end
    end
  end

endmodule
