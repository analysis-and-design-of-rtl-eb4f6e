// mcadsw_top: mini-census adaptive-support-weight stereo matching engine.
//
// Computes a dense disparity (depth) map from a rectified stereo pair held
// in external memory: left Y, U, V planes and right Y plane, 8 bits per
// pixel, W/4 words per row, 4 pixels per 32-bit word (byte k = column
// 4*word+k).  The depth map is written as bytes, NSEG*18 bytes per row
// (360 for CIF), depth = disparity*4.
// Blocks: two census_units (CENSUSL, CENSUSR) feeding two column buffers
// (CENLBUF 64 columns, CENRBUF 128 columns), weight_gen feeding VWBUF and
// HWBUF (96 columns each), the agg_wta kernel with its depth_fifo, and
// rr_arbiter + mem_ctrl sharing the one bus among the five image input
// controls and the depth FIFO.
// The frame is processed one output row at a time: for each row the
// sequencer restarts every producer and the kernel, then waits until all
// are idle and the depth FIFO has drained.  'start' begins a frame, 'done'
// pulses for one clock when the last depth byte has been written.
// Bus: see mem_ctrl (req/ack, one outstanding access).
//
// Origin: the block structure (two census units, census buffers, weight
// generator and buffers, aggregation/WTA kernel, depth FIFO, arbiter, memory
// controller) and the buffer sizes follow the original architecture.  Row by
// row processing without multi-row reuse, the bus protocol, the memory map
// and the row sequencer are this design's choices.
module mcadsw_top
  import mcadsw_pkg::*;
#(
  parameter int unsigned W    = 352,
  parameter int unsigned H    = 288,
  parameter int unsigned DISP = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base_ly,
  input  logic [ADDR_W-1:0] base_ry,
  input  logic [ADDR_W-1:0] base_lu,
  input  logic [ADDR_W-1:0] base_lv,
  input  logic [ADDR_W-1:0] base_depth,
  output logic              busy,
  output logic              done,
  // external bus
  output logic              bus_req,
  output logic              bus_we,
  output logic [ADDR_W-1:0] bus_addr,
  output logic [3:0]        bus_be,
  output logic [BUS_W-1:0]  bus_wdata,
  input  logic              bus_ack,
  input  logic [BUS_W-1:0]  bus_rdata,
  // observation strobes
  output logic              stall_wait,
  output logic              stall_fifo,
  output logic [N_REQ-1:0]  grant
);
  localparam int unsigned CW = WIN * CEN_BITS;

  // ---------------- row sequencer ----------------
  typedef enum logic [1:0] {F_IDLE, F_START, F_RUN} fstate_e;
  fstate_e    fstate;
  logic [9:0] row;
  logic       row_start;
  logic       cl_busy, cr_busy, wg_busy, k_busy, mc_idle;
  logic [$clog2(19)-1:0] dlevel;

  assign row_start = (fstate == F_START);
  assign busy      = (fstate != F_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fstate <= F_IDLE; row <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (fstate)
        F_IDLE: if (start) begin row <= '0; fstate <= F_START; end
        F_START: fstate <= F_RUN;
        F_RUN: if (!cl_busy && !cr_busy && !wg_busy && !k_busy &&
                   dlevel == 0 && mc_idle) begin
          if (row == 10'(H - 1)) begin
            done <= 1'b1; fstate <= F_IDLE;
          end else begin
            row <= row + 1'b1; fstate <= F_START;
          end
        end
        default: fstate <= F_IDLE;
      endcase
    end
  end

  // ---------------- bus sharing ----------------
  logic [N_REQ-1:0] req, gnt, rd_valid;
  logic             gnt_valid;
  logic [2:0]       gnt_id;
  rd_cmd_t          rd_cmd [N_REQ];
  wr_cmd_t          wr_cmd;
  logic [BUS_W-1:0] rd_data;
  assign grant = gnt;

  rr_arbiter u_arb (.clk, .rst_n, .enable(mc_idle), .req, .gnt, .gnt_valid, .gnt_id);

  mem_ctrl u_mc (
    .clk, .rst_n, .idle(mc_idle), .gnt_valid, .gnt_id, .rd_cmd, .wr_cmd,
    .rd_valid, .rd_data,
    .bus_req, .bus_we, .bus_addr, .bus_be, .bus_wdata, .bus_ack, .bus_rdata);

  assign rd_cmd[RQ_DEPTH] = '0;

  // ---------------- census ----------------
  logic          cl_wr, cr_wr, cl_can, cr_can;
  logic [CW-1:0] cl_wdata, cr_wdata, cl_rdata, cr_rdata;
  logic [9:0]    cl_avail, cr_avail, cl_rcol, cr_rcol;
  logic signed [10:0] cl_rel, cr_rel;

  census_unit #(.W(W), .H(H)) u_census_l (
    .clk, .rst_n, .start(row_start), .row, .base(base_ly), .busy(cl_busy),
    .req(req[RQ_CEN_LY]), .gnt(gnt[RQ_CEN_LY]), .cmd(rd_cmd[RQ_CEN_LY]),
    .rd_valid(rd_valid[RQ_CEN_LY]), .rd_data,
    .col_wr(cl_wr), .col_data(cl_wdata), .col_can_wr(cl_can));

  census_unit #(.W(W), .H(H)) u_census_r (
    .clk, .rst_n, .start(row_start), .row, .base(base_ry), .busy(cr_busy),
    .req(req[RQ_CEN_RY]), .gnt(gnt[RQ_CEN_RY]), .cmd(rd_cmd[RQ_CEN_RY]),
    .rd_valid(rd_valid[RQ_CEN_RY]), .rd_data,
    .col_wr(cr_wr), .col_data(cr_wdata), .col_can_wr(cr_can));

  col_buf #(.DEPTH(64), .WIDTH(CW)) u_cenlbuf (
    .clk, .rst_n, .start(row_start), .wr(cl_wr), .wr_data(cl_wdata), .can_wr(cl_can),
    .avail(cl_avail), .release_col(cl_rel), .rd_col(cl_rcol), .rd_data(cl_rdata));

  col_buf #(.DEPTH(128), .WIDTH(CW)) u_cenrbuf (
    .clk, .rst_n, .start(row_start), .wr(cr_wr), .wr_data(cr_wdata), .can_wr(cr_can),
    .avail(cr_avail), .release_col(cr_rel), .rd_col(cr_rcol), .rd_data(cr_rdata));

  // ---------------- weights ----------------
  logic [ADDR_W-1:0] wbase [3];
  logic [2:0]        wg_req, wg_gnt, wg_rv;
  rd_cmd_t           wg_cmd [3];
  logic              vw_wr, hw_wr, vw_can, hw_can;
  logic [WROW_W-1:0] vw_wdata, hw_wdata, vw_rdata, hw_rdata;
  logic [9:0]        vw_avail, hw_avail, vw_rcol, hw_rcol;
  logic signed [10:0] vw_rel, hw_rel;

  assign wbase = '{base_ly, base_lu, base_lv};
  assign req[RQ_WGT_LV:RQ_WGT_LY] = wg_req;
  assign wg_gnt = gnt[RQ_WGT_LV:RQ_WGT_LY];
  assign wg_rv  = rd_valid[RQ_WGT_LV:RQ_WGT_LY];
  assign rd_cmd[RQ_WGT_LY] = wg_cmd[0];
  assign rd_cmd[RQ_WGT_LU] = wg_cmd[1];
  assign rd_cmd[RQ_WGT_LV] = wg_cmd[2];

  weight_gen #(.W(W), .H(H)) u_wgen (
    .clk, .rst_n, .start(row_start), .row, .base(wbase), .busy(wg_busy),
    .req(wg_req), .gnt(wg_gnt), .cmd(wg_cmd), .rd_valid(wg_rv), .rd_data,
    .vw_wr, .vw_data(vw_wdata), .vw_can_wr(vw_can),
    .hw_wr, .hw_data(hw_wdata), .hw_can_wr(hw_can));

  col_buf #(.DEPTH(96), .WIDTH(WROW_W)) u_vwbuf (
    .clk, .rst_n, .start(row_start), .wr(vw_wr), .wr_data(vw_wdata), .can_wr(vw_can),
    .avail(vw_avail), .release_col(vw_rel), .rd_col(vw_rcol), .rd_data(vw_rdata));

  col_buf #(.DEPTH(96), .WIDTH(WROW_W)) u_hwbuf (
    .clk, .rst_n, .start(row_start), .wr(hw_wr), .wr_data(hw_wdata), .can_wr(hw_can),
    .avail(hw_avail), .release_col(hw_rel), .rd_col(hw_rcol), .rd_data(hw_rdata));

  // ---------------- kernel and depth FIFO ----------------
  logic              dpush, dfull;
  logic [ADDR_W+1:0] dbaddr;
  logic [PIX_W-1:0]  ddepth;

  agg_wta #(.W(W), .DISP(DISP)) u_kernel (
    .clk, .rst_n, .start(row_start), .row, .base_depth, .busy(k_busy),
    .cl_avail, .cr_avail, .cl_rd_col(cl_rcol), .cr_rd_col(cr_rcol),
    .cl_rd_data(cl_rdata), .cr_rd_data(cr_rdata),
    .cl_release(cl_rel), .cr_release(cr_rel),
    .vw_avail, .hw_avail, .vw_rd_col(vw_rcol), .hw_rd_col(hw_rcol),
    .vw_rd_data(vw_rdata), .hw_rd_data(hw_rdata),
    .vw_release(vw_rel), .hw_release(hw_rel),
    .dpush, .dbaddr, .ddepth, .dfull, .stall_wait, .stall_fifo);

  depth_fifo #(.DEPTH(18)) u_dfifo (
    .clk, .rst_n, .push(dpush), .push_baddr(dbaddr), .push_depth(ddepth),
    .full(dfull), .req(req[RQ_DEPTH]), .gnt(gnt[RQ_DEPTH]), .wr_cmd, .level(dlevel));
endmodule
