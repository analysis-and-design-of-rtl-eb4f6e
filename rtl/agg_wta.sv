// agg_wta: cost aggregation and winner-takes-all kernel.
//
// Output row y is cut into segments of SEG=18 pixels.  For a segment with
// first pixel x0 the kernel waits until the census and weight buffers hold
// every column it needs (left census and vertical weights up to x0+32,
// right census up to x0+32, horizontal weights up to x0+17), then sweeps
// the disparities d = 0..63 in slots of ENTRIES=48 clocks:
//  * vertical pass: in clock k of slot d, column x' = x0-15+k is aggregated
//    by vert_pe (Hamming costs of left column x' and right column x'-d,
//    shifted by the vertical weights of x') and stored in ping-pong bank d%2;
//  * horizontal pass: in clocks k < SEG of slot d+1, pixel x0+k is
//    aggregated by horz_pe over bank d%2 entries k..k+30 with the horizontal
//    weights of that pixel, and the result goes to the WTA.
// Columns outside the image contribute nothing (vertical cost 0); a right
// column left of the image reads as census code 0.  After the sweep the
// SEG depths are pushed into the depth FIFO, stalling while it is full, at
// byte address 4*base_depth + y*SEG*NSEG + x (the depth map is NSEG*SEG
// bytes wide), and the columns no longer needed are released.
// One V cost per clock and one H cost per clock: a segment takes
// (DISP+1)*ENTRIES + SEG clocks when nothing stalls.
//
// Origin: Hamming cost, vertical then horizontal weighted aggregation,
// the 48-entry ping-pong buffer, WTA and the 18-pixel output segments follow
// the original architecture.  One processing element per pass, the
// disparity-slot schedule, one row at a time without multi-row reuse, and the
// treatment of image borders are this design's choices; they make it several
// times slower than the original.
module agg_wta
  import mcadsw_pkg::*;
#(
  parameter int unsigned W       = 352,
  parameter int unsigned DISP    = 64,
  parameter int unsigned SEG     = 18,
  parameter int unsigned ENTRIES = SEG + WIN - 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [9:0]            row,
  input  logic [ADDR_W-1:0]     base_depth,
  output logic                  busy,
  // census buffers
  input  logic [9:0]            cl_avail, cr_avail,
  output logic [9:0]            cl_rd_col, cr_rd_col,
  input  logic [WIN*CEN_BITS-1:0] cl_rd_data, cr_rd_data,
  output logic signed [10:0]    cl_release, cr_release,
  // weight buffers
  input  logic [9:0]            vw_avail, hw_avail,
  output logic [9:0]            vw_rd_col, hw_rd_col,
  input  logic [WROW_W-1:0]     vw_rd_data, hw_rd_data,
  output logic signed [10:0]    vw_release, hw_release,
  // depth FIFO
  output logic                  dpush,
  output logic [ADDR_W+1:0]     dbaddr,
  output logic [PIX_W-1:0]      ddepth,
  input  logic                  dfull,
  // event counters for observation
  output logic                  stall_wait,    // waiting for input columns
  output logic                  stall_fifo     // waiting on a full depth FIFO
);
  localparam int unsigned NSEG = (W + SEG - 1) / SEG;
  localparam int unsigned DW   = NSEG * SEG;   // depth map width
  localparam int unsigned DBW  = $clog2(DISP);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_SWEEP, S_OUT} state_e;
  state_e state;

  logic [9:0]                    x0;
  logic [$clog2(NSEG+1)-1:0]     seg;
  logic [DBW:0]                  slot;        // 0..DISP
  logic [$clog2(ENTRIES)-1:0]    k;
  logic [$clog2(SEG)-1:0]        oi;

  // ---------------- readiness of the segment ----------------
  function automatic logic [9:0] need(input logic [9:0] upto);
    return (upto > 10'(W)) ? 10'(W) : upto;
  endfunction
  logic ready;
  assign ready = (cl_avail >= need(x0 + 10'(SEG + HALF))) &&
                 (cr_avail >= need(x0 + 10'(SEG + HALF))) &&
                 (vw_avail >= need(x0 + 10'(SEG + HALF))) &&
                 (hw_avail >= need(x0 + 10'(SEG)));

  // ---------------- vertical pass ----------------
  logic signed [11:0] xv, xr;
  logic [DBW-1:0]     dv;
  assign dv = DBW'(slot);
  assign xv = $signed({2'b0, x0}) - HALF + $signed({1'b0, 11'(k)});
  assign xr = xv - $signed({1'b0, 11'(dv)});
  assign cl_rd_col = 10'(xv);
  assign cr_rd_col = 10'(xr);
  assign vw_rd_col = 10'(xv);

  logic xv_in, xr_in;
  assign xv_in = (xv >= 0) && (xv < $signed(12'(W)));
  assign xr_in = (xr >= 0);

  logic [CEN_BITS-1:0] cen_l [WIN], cen_r [WIN];
  logic [2:0]          vwc [WIN-1], hwc [WIN-1];
  always_comb begin
    for (int j = 0; j < WIN; j++) begin
      cen_l[j] = cl_rd_data[j*CEN_BITS +: CEN_BITS];
      cen_r[j] = xr_in ? cr_rd_data[j*CEN_BITS +: CEN_BITS] : '0;
    end
    for (int j = 0; j < WIN - 1; j++) begin
      vwc[j] = vw_rd_data[j*3 +: 3];
      hwc[j] = hw_rd_data[j*3 +: 3];
    end
  end

  logic [VCOST_W-1:0] vcost;
  vert_pe u_vpe (.cen_l, .cen_r, .wcode(vwc), .vcost);

  logic v_active, h_active;
  assign v_active = (state == S_SWEEP) && (slot < (DBW+1)'(DISP));
  assign h_active = (state == S_SWEEP) && (slot != 0) && (k < ($clog2(ENTRIES))'(SEG));

  logic [VCOST_W-1:0] pp_rd [ENTRIES];
  pingpong_buf #(.ENTRIES(ENTRIES)) u_pp (
    .clk, .wr(v_active), .wr_bank(slot[0]), .wr_idx(k),
    .wr_data(xv_in ? vcost : '0),
    .rd_bank(~slot[0]), .rd_entries(pp_rd));

  // ---------------- horizontal pass ----------------
  logic [9:0] xh;
  assign xh = x0 + 10'(k);
  assign hw_rd_col = xh;
  logic [VCOST_W-1:0] hwin [WIN];
  logic [2:0]         hwc_m [WIN-1];
  always_comb begin
    for (int i = 0; i < WIN; i++)
      hwin[i] = pp_rd[($clog2(ENTRIES))'(k) + ($clog2(ENTRIES))'(i)];
    for (int i = 0; i < WIN - 1; i++)
      hwc_m[i] = (xh < 10'(W)) ? hwc[i] : WCODE_ZERO;
  end
  logic [HCOST_W-1:0] hcost;
  horz_pe u_hpe (.vcost(hwin), .wcode(hwc_m), .hcost);

  logic [DBW-1:0]   best_disp [SEG];
  logic [PIX_W-1:0] depth     [SEG];
  wta #(.SEG(SEG), .DISP(DISP)) u_wta (
    .clk, .rst_n, .clear(state == S_WAIT), .valid(h_active),
    .idx(($clog2(SEG))'(k)), .disp(DBW'(slot - 1'b1)), .cost(hcost),
    .best_disp, .depth);

  // ---------------- output and release ----------------
  assign dpush  = (state == S_OUT) && !dfull;
  assign ddepth = depth[oi];
  assign dbaddr = {base_depth, 2'b00} + (ADDR_W+2)'(row) * (ADDR_W+2)'(DW)
                + (ADDR_W+2)'(x0) + (ADDR_W+2)'(oi);

  assign cl_release = $signed({1'b0, x0}) - HALF;
  assign vw_release = cl_release;
  assign cr_release = cl_release - $signed(11'(DISP - 1));
  assign hw_release = $signed({1'b0, x0});

  assign busy       = (state != S_IDLE);
  assign stall_wait = (state == S_WAIT) && !ready;
  assign stall_fifo = (state == S_OUT) && dfull;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; x0 <= '0; seg <= '0; slot <= '0; k <= '0; oi <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          x0 <= '0; seg <= '0; state <= S_WAIT;
        end
        S_WAIT: if (ready) begin
          slot <= '0; k <= '0; state <= S_SWEEP;
        end
        S_SWEEP: begin
          if (k == ($clog2(ENTRIES))'(ENTRIES - 1)) begin
            k <= '0;
            if (slot == (DBW+1)'(DISP)) begin
              oi <= '0; state <= S_OUT;
            end else slot <= slot + 1'b1;
          end else k <= k + 1'b1;
        end
        S_OUT: if (!dfull) begin
          if (oi == ($clog2(SEG))'(SEG - 1)) begin
            x0 <= x0 + 10'(SEG);
            seg <= seg + 1'b1;
            state <= (seg == ($clog2(NSEG+1))'(NSEG - 1)) ? S_IDLE : S_WAIT;
          end else oi <= oi + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
