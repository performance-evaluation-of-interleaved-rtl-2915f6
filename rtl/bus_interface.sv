// bus_interface: one connection from the CPU to main memory.
//
// Like the original processor's bus interface it carries a single request at
// a time. It accepts a line transfer (fetch or copy-back) when idle, keeps
// the thread, cache and kind of the transfer while memory works on it, and
// returns the result tagged with them: for a fetch the line read, for a
// copy-back an acknowledge. Several instances side by side form the
// "variable" and "fully connected" bus configurations.
//
// Memory side (this design's choice of a simple protocol): `m_req_valid`
// is held with write/address/data until `m_req_ready`; later `m_rsp_valid`
// returns the line (read) or completion (write) for one cycle.
// CPU side: `req_valid`/`req_ready` in, `rsp_valid`/`rsp_ready` out; the
// response is held until accepted. Back-to-back: a new request is accepted
// in the cycle after the response is taken.
module bus_interface
  import mt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // CPU side
  input  logic       req_valid,
  input  mem_xfer_t  req,
  output logic       req_ready,
  output logic       rsp_valid,
  output mem_xfer_t  rsp,
  input  logic       rsp_ready,
  // memory side
  output logic       m_req_valid,
  output logic       m_req_write,
  output line_addr_t m_req_addr,
  output line_t      m_req_wdata,
  input  logic       m_req_ready,
  input  logic       m_rsp_valid,
  input  line_t      m_rsp_rdata,
  output logic       busy
);

  typedef enum logic [1:0] {BI_IDLE, BI_REQ, BI_WAIT, BI_RSP} bi_state_e;
  bi_state_e state;
  mem_xfer_t cur;

  assign req_ready   = state == BI_IDLE;
  assign busy        = state != BI_IDLE;
  assign m_req_valid = state == BI_REQ;
  assign m_req_write = cur.kind == REQ_WRITEBACK;
  assign m_req_addr  = cur.addr;
  assign m_req_wdata = cur.data;
  assign rsp_valid   = state == BI_RSP;
  assign rsp         = cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= BI_IDLE;
      cur   <= '0;
    end else begin
      unique case (state)
        BI_IDLE: if (req_valid) begin
          cur   <= req;
          state <= BI_REQ;
        end
        BI_REQ:  if (m_req_ready) state <= BI_WAIT;
        BI_WAIT: if (m_rsp_valid) begin
          if (cur.kind == REQ_FETCH) cur.data <= m_rsp_rdata;
          state <= BI_RSP;
        end
        BI_RSP:  if (rsp_ready) state <= BI_IDLE;
        default: state <= BI_IDLE;
      endcase
    end
  end

  a_rsp_only_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    m_rsp_valid |-> state == BI_WAIT);

endmodule
