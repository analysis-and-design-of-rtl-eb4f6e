// weight_gen: WEIGHTGEN, adaptive support weights from the left YUV image.
//
// For output row y it produces two streams of 90-bit weight words (30
// three-bit shift codes each, centre skipped):
//  * vertical weights, one word per column c: the codes of pixels
//    (c, y+j), j = -15..15, against the centre (c, y), written to VWBUF;
//  * horizontal weights, one word per pixel x: the codes of pixels
//    (x+i, y), i = -15..15, against (x, y), written to HWBUF.
// The input image buffer holds Y, U and V of rows y-15..y+15 for two
// 4-pixel column groups; three input controls (one per component, each a
// separate bus requester) fill a group with one read burst each.  While the
// vertical weights of a group are made, the centre-row pixels are copied to
// BUFFYUV (64 columns, cyclic); the horizontal weights of pixel x are made
// once BUFFYUV holds column x+15, i.e. after group g, x = 4g-15..4g-12.
// A neighbour outside the image gets weight 0 (code 7): this design's choice.
// Codes come from weight_lut (Manhattan distance, quantised to powers of two).
//
// Origin: vertical then horizontal weight generation from the left YUV image,
// with three input controls and the centre-row buffer BUFFYUV, follows the
// original; the 8-column input buffers, the 64-entry BUFFYUV and fetching
// the three components one after another are this design's choices.
module weight_gen
  import mcadsw_pkg::*;
#(
  parameter int unsigned W = 352,
  parameter int unsigned H = 288
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [9:0]        row,
  input  logic [ADDR_W-1:0] base [3],      // Y, U, V planes
  output logic              busy,
  output logic [2:0]        req,
  input  logic [2:0]        gnt,
  output rd_cmd_t           cmd [3],
  input  logic [2:0]        rd_valid,
  input  logic [BUS_W-1:0]  rd_data,
  output logic              vw_wr,
  output logic [WROW_W-1:0] vw_data,
  input  logic              vw_can_wr,
  output logic              hw_wr,
  output logic [WROW_W-1:0] hw_data,
  input  logic              hw_can_wr
);
  localparam int unsigned WPR   = W / 4;
  localparam int unsigned LASTG = (W + 14) / 4;
  localparam int unsigned BW    = 64;          // BUFFYUV columns

  typedef enum logic [2:0] {S_IDLE, S_CLR, S_REQ, S_RECV, S_VW, S_HW} state_e;
  state_e state;

  logic [PIX_W-1:0] img  [3][WIN][8];
  logic [PIX_W-1:0] buff [3][BW];
  logic [6:0]  grp;
  logic [1:0]  comp;         // component being fetched
  logic [1:0]  sub;
  logic [4:0]  wrow;
  logic signed [11:0] r_first, r_last, r_top;

  always_comb begin
    r_top   = $signed({2'b0, row}) - HALF;
    r_first = r_top;
    r_last  = $signed({2'b0, row}) + HALF;
    if (r_first < 0) r_first = 0;
    if (r_last > $signed(12'(H - 1))) r_last = 12'(H - 1);
  end

  for (genvar k = 0; k < 3; k++) begin : g_cmd
    assign cmd[k].base   = base[k] + ADDR_W'(r_first) * ADDR_W'(WPR) + ADDR_W'(grp);
    assign cmd[k].stride = ADDR_W'(WPR);
    assign cmd[k].count  = CNT_W'(r_last - r_first + 1);
    assign req[k] = (state == S_REQ) && (comp == 2'(k));
  end
  assign busy = (state != S_IDLE);

  // ---------------- vertical weights of column vcol ----------------
  logic signed [11:0] vcol, hx;
  assign vcol = $signed({5'b0, grp, 2'b00}) + $signed({10'b0, sub});
  assign hx   = vcol - 15;
  logic [2:0] vslot;
  assign vslot = vcol[2:0];

  for (genvar j = 0; j < WIN; j++) begin : g_vw
    if (j != HALF) begin : g_n
      localparam int K = (j < HALF) ? j : j - 1;
      logic [9:0] cdist;
      logic [2:0] code;
      logic       in_img;
      weight_lut u_lut (
        .c_y(img[0][HALF][vslot]), .c_u(img[1][HALF][vslot]), .c_v(img[2][HALF][vslot]),
        .n_y(img[0][j][vslot]),    .n_u(img[1][j][vslot]),    .n_v(img[2][j][vslot]),
        .cdist, .code);
      assign in_img = (r_top + j >= 0) && (r_top + j < $signed(12'(H)));
      assign vw_data[K*3 +: 3] = in_img ? code : WCODE_ZERO;
    end
  end

  // ---------------- horizontal weights of pixel hx ----------------
  for (genvar i = 0; i < WIN; i++) begin : g_hw
    if (i != HALF) begin : g_n
      localparam int K = (i < HALF) ? i : i - 1;
      logic [9:0] cdist;
      logic [2:0] code;
      logic       in_img;
      logic signed [11:0] nx;
      logic [5:0] cs, ns;
      assign nx = hx + i - HALF;
      assign cs = hx[5:0];
      assign ns = nx[5:0];
      weight_lut u_lut (
        .c_y(buff[0][cs]), .c_u(buff[1][cs]), .c_v(buff[2][cs]),
        .n_y(buff[0][ns]), .n_u(buff[1][ns]), .n_v(buff[2][ns]),
        .cdist, .code);
      assign in_img = (nx >= 0) && (nx < $signed(12'(W)));
      assign hw_data[K*3 +: 3] = in_img ? code : WCODE_ZERO;
    end
  end

  logic v_in, h_in;
  assign v_in  = (vcol < $signed(12'(W)));
  assign h_in  = (hx >= 0) && (hx < $signed(12'(W)));
  assign vw_wr = (state == S_VW) && v_in && vw_can_wr;
  assign hw_wr = (state == S_HW) && h_in && hw_can_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; grp <= '0; comp <= '0; sub <= '0; wrow <= '0;
      for (int k = 0; k < 3; k++) begin
        for (int r = 0; r < WIN; r++) for (int c = 0; c < 8; c++) img[k][r][c] <= '0;
        for (int c = 0; c < BW; c++) buff[k][c] <= '0;
      end
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          grp <= '0; sub <= '0;
          state <= S_CLR;
        end
        S_CLR: begin
          for (int k = 0; k < 3; k++)
            for (int r = 0; r < WIN; r++) for (int c = 0; c < 4; c++)
              img[k][r][{grp[0], 2'(c)}] <= '0;
          comp  <= '0;
          wrow  <= 5'(r_first - r_top);
          state <= (grp < 7'(WPR)) ? S_REQ : S_VW;
        end
        S_REQ: if (gnt[comp]) state <= S_RECV;
        S_RECV: if (rd_valid[comp]) begin
          for (int c = 0; c < 4; c++)
            img[comp][wrow][{grp[0], 2'(c)}] <= rd_data[8*c +: 8];
          wrow <= wrow + 1'b1;
          if (5'(wrow + 1) == 5'(r_last - r_top + 1)) begin
            wrow <= 5'(r_first - r_top);
            if (comp == 2'd2) state <= S_VW;
            else begin
              comp  <= comp + 1'b1;
              state <= S_REQ;
            end
          end
        end
        S_VW: if (!v_in || vw_can_wr) begin
          for (int k = 0; k < 3; k++)
            buff[k][vcol[5:0]] <= img[k][HALF][vslot];
          sub <= sub + 1'b1;
          if (sub == 2'd3) state <= S_HW;
        end
        S_HW: if (!h_in || hw_can_wr) begin
          sub <= sub + 1'b1;
          if (sub == 2'd3) begin
            if (grp == 7'(LASTG)) state <= S_IDLE;
            else begin
              grp   <= grp + 1'b1;
              state <= S_CLR;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
