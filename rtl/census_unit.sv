// census_unit: CENSUSL / CENSUSR, the mini-census transform of one image.
//
// For output row y it produces, column by column from left to right, the
// 31 mini-census codes of rows y-15..y+15 and writes them as one 186-bit
// column into its census buffer.  The input image buffer (IMGLYBUF or
// IMGRYBUF) holds 35 rows (y-17..y+17) by 8 columns, i.e. two 4-pixel
// column groups used cyclically.  For each group the input control clears
// the group's slot, requests one read burst over the buffer's rows (one
// 32-bit word, 4 pixels, per row; rows outside the image are not fetched
// and stay 0, as do groups right of the image), then the census block
// computes columns 4g-2..4g+1, which need only the two groups held.
// Each census column waits until the census buffer's update table frees
// its slot.  'start' begins a row, 'busy' stays high until the last column
// of the row has been written.
// Pixel k of a bus word is column 4*word+k (byte k).  Row y of the plane
// starts at word base + y*W/4.
//
// Origin: a 35-row x 8-column image buffer feeding 31 mini-census
// transforms follows the original; the two 4-column groups, zero rows outside
// the image and the state machine are this design's choices.
module census_unit
  import mcadsw_pkg::*;
#(
  parameter int unsigned W = 352,
  parameter int unsigned H = 288
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [9:0]        row,
  input  logic [ADDR_W-1:0] base,
  output logic              busy,
  // request-valid link to the memory controller
  output logic              req,
  input  logic              gnt,
  output rd_cmd_t           cmd,
  input  logic              rd_valid,
  input  logic [BUS_W-1:0]  rd_data,
  // census buffer write side
  output logic              col_wr,
  output logic [WIN*CEN_BITS-1:0] col_data,
  input  logic              col_can_wr
);
  localparam int unsigned ROWS = WIN + 2 * CEN_R;  // 35
  localparam int unsigned WPR  = W / 4;            // words per image row
  localparam int unsigned NG   = WPR + 1;          // groups incl. one zero group
  localparam int signed   TOP  = HALF + CEN_R;     // 17

  typedef enum logic [2:0] {S_IDLE, S_CLR, S_REQ, S_RECV, S_COMP} state_e;
  state_e state;

  logic [PIX_W-1:0] img [ROWS][8];
  logic [6:0]  grp;          // current group
  logic [1:0]  sub;          // column within the group's census span
  logic [5:0]  wrow;         // buffer row of the next received word
  logic signed [11:0] r_first, r_last;
  logic signed [11:0] col;   // column being transformed

  // Rows of the image covered by the buffer, clipped to the image.
  always_comb begin
    r_first = $signed({2'b0, row}) - TOP;
    r_last  = $signed({2'b0, row}) + TOP;
    if (r_first < 0) r_first = 0;
    if (r_last > $signed(12'(H - 1))) r_last = 12'(H - 1);
  end

  always_comb begin
    cmd.base   = base + ADDR_W'(r_first) * ADDR_W'(WPR) + ADDR_W'(grp);
    cmd.stride = ADDR_W'(WPR);
    cmd.count  = CNT_W'(r_last - r_first + 1);
  end
  assign req  = (state == S_REQ);
  assign busy = (state != S_IDLE);
  assign col  = $signed({5'b0, grp, 2'b00}) - 2 + $signed({10'b0, sub});

  // Census of the current column: 31 transforms in parallel.
  logic [2:0] cc, cl, cr;    // column slots of c, c-2, c+2
  assign cc = col[2:0];
  assign cl = 3'(col - 2);
  assign cr = 3'(col + 2);
  for (genvar j = 0; j < WIN; j++) begin : g_cen
    logic [PIX_W-1:0] s [CEN_BITS];
    assign s[0] = img[j][cl];
    assign s[1] = img[j][cr];
    assign s[2] = img[j+2][cl];
    assign s[3] = img[j+2][cr];
    assign s[4] = img[j+4][cl];
    assign s[5] = img[j+4][cr];
    mini_census u_mc (.center(img[j+2][cc]), .sample(s),
                      .code(col_data[j*CEN_BITS +: CEN_BITS]));
  end

  logic col_in_image;
  assign col_in_image = (col >= 0) && (col < $signed(12'(W)));
  assign col_wr = (state == S_COMP) && col_in_image && col_can_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; grp <= '0; sub <= '0; wrow <= '0;
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < 8; c++) img[r][c] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          grp <= '0; sub <= '0;
          for (int r = 0; r < ROWS; r++) for (int c = 0; c < 8; c++) img[r][c] <= '0;
          state <= S_CLR;
        end
        S_CLR: begin
          for (int r = 0; r < ROWS; r++) for (int c = 0; c < 4; c++)
            img[r][{grp[0], 2'(c)}] <= '0;
          wrow  <= 6'(r_first - ($signed({2'b0, row}) - TOP));
          state <= (grp < 7'(WPR)) ? S_REQ : S_COMP;
        end
        S_REQ: if (gnt) state <= S_RECV;
        S_RECV: if (rd_valid) begin
          for (int c = 0; c < 4; c++)
            img[wrow][{grp[0], 2'(c)}] <= rd_data[8*c +: 8];
          wrow <= wrow + 1'b1;
          if (6'(wrow + 1) == 6'(r_last - ($signed({2'b0, row}) - TOP) + 1))
            state <= S_COMP;
        end
        S_COMP: if (!col_in_image || col_can_wr) begin
          sub <= sub + 1'b1;
          if (sub == 2'd3) begin
            if (grp == 7'(NG - 1)) state <= S_IDLE;
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
