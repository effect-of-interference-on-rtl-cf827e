// adm2d_encoder: two-dimensional intraframe adaptive delta modulator.
//
// Two delta modulators work side by side. The horizontal one continues from
// the previously coded pixel of the same line, the vertical one from the
// pixel above, whose state is kept in a one-line memory (line_store). For
// every pixel each modulator compares the pixel with its estimate and forms
// its own delta bit and next estimate (adm_update, the step rule and
// estimate update of the one-dimensional coder). The decision block picks
// the modulator whose estimate is closer to the pixel. The chosen
// modulator's bit and new state are kept: the state becomes the horizontal
// modulator's starting point for the next pixel and is written to the line
// memory for the pixel below. Two bits go out per pixel: the delta bit and
// the direction bit.
//
// A state is (estimate, step magnitude, last delta bit). The first pixel of
// a frame starts from the all-zero state; the rest of the first line is coded
// horizontally and the first pixel of each other line vertically. Keeping
// the chosen state for both directions, the edge rules and the zero start
// are this design's choices.
//
// Interface: one pixel per rising clk edge with pix_valid high; sol marks
// the first pixel of a line and sof (together with sol) the first pixel of a
// frame. Lines are at most LINE_LEN pixels. The symbol tx and the
// reconstructed pixel recon are registered: latency one clock.
module adm2d_encoder
  import adm_pkg::*;
#(
  parameter int unsigned VIDEO_W  = adm_pkg::ADM_VIDEO_W,
  parameter int unsigned YMIN     = adm_pkg::ADM_YMIN,
  parameter int unsigned YMAX     = adm_pkg::ADM_YMAX,
  parameter int unsigned LINE_LEN = adm_pkg::ADM_LINE_LEN
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pix_valid,
  input  logic [VIDEO_W-1:0] pix,
  input  logic               sol,
  input  logic               sof,
  output adm2d_sym_t         tx,
  output logic [VIDEO_W-1:0] recon
);

  localparam int unsigned STEP_W = $clog2(YMAX + 1);
  localparam int unsigned ST_W   = VIDEO_W + STEP_W + 1;
  localparam int unsigned ADDR_W = $clog2(LINE_LEN);

  // ---- pixel position ----
  logic [ADDR_W-1:0] col_q, col;
  logic              row0_q, row0;

  assign col  = sol ? '0 : col_q;
  assign row0 = sof ? 1'b1 : (sol ? 1'b0 : row0_q);

  // ---- neighbour states ----
  logic [VIDEO_W-1:0] hx_q, hx, vx;
  logic [STEP_W-1:0]  hy_q, hy, vy;
  logic               he_q, he, ve;
  logic [ST_W-1:0]    v_rd, st_wr;

  // The first pixel of a frame starts from the zero state.
  assign hx = sof ? '0 : hx_q;
  assign hy = sof ? '0 : hy_q;
  assign he = sof ? 1'b0 : he_q;
  assign {vx, vy, ve} = v_rd;

  // ---- the two delta modulators ----
  logic               eh, ev;
  logic [VIDEO_W-1:0] xh_new, xv_new;
  logic [STEP_W-1:0]  yh_new, yv_new;

  assign eh = (pix >= hx);
  assign ev = (pix >= vx);

  adm_update #(.VIDEO_W(VIDEO_W), .YMIN(YMIN), .YMAX(YMAX), .STEP_W(STEP_W)) u_dm_h (
    .x(hx), .y(hy), .e(he), .e_new(eh), .x_new(xh_new), .y_new(yh_new)
  );

  adm_update #(.VIDEO_W(VIDEO_W), .YMIN(YMIN), .YMAX(YMAX), .STEP_W(STEP_W)) u_dm_v (
    .x(vx), .y(vy), .e(ve), .e_new(ev), .x_new(xv_new), .y_new(yv_new)
  );

  // ---- decision ----
  dir_e dir;

  adm2d_decision #(.VIDEO_W(VIDEO_W)) u_dec (
    .s(pix), .xh(hx), .xv(vx), .h_ok(!sol), .v_ok(!row0), .dir(dir)
  );

  logic               e_sel;
  logic [VIDEO_W-1:0] x_sel;
  logic [STEP_W-1:0]  y_sel;

  always_comb begin
    if (dir == DIR_V) begin
      e_sel = ev; x_sel = xv_new; y_sel = yv_new;
    end else begin
      e_sel = eh; x_sel = xh_new; y_sel = yh_new;
    end
  end

  assign st_wr = {x_sel, y_sel, e_sel};

  line_store #(.LINE_LEN(LINE_LEN), .WIDTH(ST_W), .ADDR_W(ADDR_W)) u_line (
    .clk(clk), .we(pix_valid), .addr(col), .wdata(st_wr), .rdata(v_rd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q  <= '0;
      row0_q <= 1'b1;
      hx_q   <= '0;
      hy_q   <= '0;
      he_q   <= 1'b0;
      tx     <= '0;
      recon  <= '0;
    end else begin
      tx.valid <= pix_valid;
      if (pix_valid) begin
        col_q  <= col + 1'b1;
        row0_q <= row0;
        hx_q   <= x_sel;
        hy_q   <= y_sel;
        he_q   <= e_sel;
        tx.sof <= sof;
        tx.sol <= sol;
        tx.dir <= dir;
        tx.e   <= e_sel;
        recon  <= x_sel;
      end
    end
  end

  // A line must not be longer than the line memory.
  a_line_len: assert property (@(posedge clk) disable iff (!rst_n)
    pix_valid |-> (32'(col) < LINE_LEN));

endmodule
