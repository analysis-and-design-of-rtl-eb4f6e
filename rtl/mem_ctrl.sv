// mem_ctrl: memory controller between the arbiter and the external bus.
//
// While idle it lets the arbiter grant one requester ('idle' enables the
// arbiter).  A grant to requester 0, the depth FIFO, writes the FIFO's head
// word (one word per grant: request-grant).  A grant to one of the image
// input controls latches that requester's read burst (base, stride, count)
// and reads the words one after another; every word returned is broadcast
// on rd_data with the requester's bit of rd_valid high for one clock
// (request-valid).  Bus protocol (this design's own): bus_req stays high with
// a stable command until the memory answers with a one-clock bus_ack; read
// data are on bus_rdata in the ack cycle.  One access is outstanding at a time.
//
// Origin: the original only names a memory controller between the arbiter and
// the bus; everything inside this block is this design's choice.
module mem_ctrl
  import mcadsw_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // arbiter side
  output logic                  idle,
  input  logic                  gnt_valid,
  input  logic [2:0]            gnt_id,
  input  rd_cmd_t               rd_cmd [N_REQ],
  input  wr_cmd_t               wr_cmd,
  output logic [N_REQ-1:0]      rd_valid,
  output logic [BUS_W-1:0]      rd_data,
  // bus side
  output logic                  bus_req,
  output logic                  bus_we,
  output logic [ADDR_W-1:0]     bus_addr,
  output logic [3:0]            bus_be,
  output logic [BUS_W-1:0]      bus_wdata,
  input  logic                  bus_ack,
  input  logic [BUS_W-1:0]      bus_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} state_e;
  state_e            state;
  logic [2:0]        id_q;
  logic [ADDR_W-1:0] stride_q;
  logic [CNT_W-1:0]  left_q;

  assign idle = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; id_q <= '0; stride_q <= '0; left_q <= '0;
      bus_req <= 1'b0; bus_we <= 1'b0; bus_addr <= '0; bus_be <= '0; bus_wdata <= '0;
      rd_valid <= '0; rd_data <= '0;
    end else begin
      rd_valid <= '0;
      unique case (state)
        S_IDLE: if (gnt_valid) begin
          id_q <= gnt_id;
          if (gnt_id == 3'(RQ_DEPTH)) begin
            bus_req <= 1'b1; bus_we <= 1'b1;
            bus_addr <= wr_cmd.addr; bus_be <= wr_cmd.be; bus_wdata <= wr_cmd.data;
            state <= S_WRITE;
          end else if (rd_cmd[gnt_id].count != 0) begin
            bus_req <= 1'b1; bus_we <= 1'b0; bus_be <= 4'hf;
            bus_addr <= rd_cmd[gnt_id].base;
            stride_q <= rd_cmd[gnt_id].stride;
            left_q   <= rd_cmd[gnt_id].count;
            state <= S_READ;
          end
        end
        S_READ: if (bus_ack) begin
          rd_valid[id_q] <= 1'b1;
          rd_data        <= bus_rdata;
          bus_addr       <= bus_addr + stride_q;
          left_q         <= left_q - 1'b1;
          if (left_q == 1) begin
            bus_req <= 1'b0;
            state   <= S_IDLE;
          end
        end
        S_WRITE: if (bus_ack) begin
          bus_req <= 1'b0; bus_we <= 1'b0;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
