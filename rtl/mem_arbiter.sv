// mem_arbiter: shares one memory master port among NM requesters.
//
// Inside a drawing unit it lets the read stage and the write stage use the
// single bus D0 that the document assigns to both. The document only says
// that the bus is shared; the scheme here is this design's own, and the
// module works for any number of requesters.
//
// Requests use a valid/ready handshake. Among the requesters whose valid is
// high, the first one at or after a rotating pointer is granted
// (round-robin); the pointer moves past the granted requester after every
// accepted request, so a requester waits for at most NM-1 others. Reads are
// answered by the memory in request order, so the arbiter keeps the granted
// requester's number in a FIFO for every accepted read and hands each
// response to the requester at the FIFO's head. When MAX_OUTST reads are
// outstanding no further request is granted. Responses carry no
// back-pressure: a requester must accept a response in the cycle it
// arrives.
//
// Timing: the grant is combinational (request to memory port in the same
// cycle); responses pass through combinationally.
module mem_arbiter
  import sprite_pkg::*;
#(
  parameter int unsigned NM        = 2,   // number of requesters
  parameter int unsigned MAX_OUTST = 16   // outstanding reads tracked
) (
  input  logic            clk,
  input  logic            rst_n,
  // requester side
  input  logic [NM-1:0]   s_req_valid,
  input  mem_req_t        s_req [NM],
  output logic [NM-1:0]   s_req_ready,
  output logic [NM-1:0]   s_rsp_valid,
  output word_t           s_rsp_rdata,
  // memory side
  output logic            m_req_valid,
  output mem_req_t        m_req,
  input  logic            m_req_ready,
  input  logic            m_rsp_valid,
  input  word_t           m_rsp_rdata
);

  localparam int unsigned IDW = (NM > 1) ? $clog2(NM) : 1;
  localparam int unsigned QW  = $clog2(MAX_OUTST);

  typedef logic [IDW-1:0] id_t;

  id_t           rr_ptr;        // first requester to consider
  id_t           grant;         // granted requester
  logic          any_req;
  logic          fifo_full;
  logic          fifo_empty;
  id_t           id_fifo [MAX_OUTST];
  logic [QW-1:0] wr_ptr, rd_ptr;
  logic [QW:0]   count;
  logic          accept;        // request handed to memory this cycle
  logic          push, pop;

  // Round-robin choice.
  always_comb begin
    any_req = 1'b0;
    grant   = '0;
    for (int k = 0; k < NM; k++) begin
      automatic int unsigned idx = (int'(rr_ptr) + k) % NM;
      if (!any_req && s_req_valid[idx]) begin
        any_req = 1'b1;
        grant   = id_t'(idx);
      end
    end
  end

  assign fifo_full   = (count == (QW+1)'(MAX_OUTST));
  assign fifo_empty  = (count == '0);
  assign m_req_valid = any_req && !fifo_full;
  assign m_req       = s_req[grant];
  assign accept      = m_req_valid && m_req_ready;

  always_comb begin
    s_req_ready = '0;
    if (m_req_ready && !fifo_full) s_req_ready[grant] = any_req;
  end

  assign push = accept && !m_req.we;
  assign pop  = m_rsp_valid;

  always_comb begin
    s_rsp_valid = '0;
    if (m_rsp_valid) s_rsp_valid[id_fifo[rd_ptr]] = 1'b1;
  end
  assign s_rsp_rdata = m_rsp_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_ptr <= '0;
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (accept) rr_ptr <= (int'(grant) == NM - 1) ? '0 : grant + 1'b1;
      if (push) wr_ptr <= (int'(wr_ptr) == MAX_OUTST - 1) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (int'(rd_ptr) == MAX_OUTST - 1) ? '0 : rd_ptr + 1'b1;
      count <= count + (QW+1)'(push) - (QW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) id_fifo[wr_ptr] <= grant;
  end

  // A response needs an outstanding read to belong to.
  a_rsp_has_owner: assert property (@(posedge clk) disable iff (!rst_n)
                                    m_rsp_valid |-> !fifo_empty)
    else $error("mem_arbiter: read response with no outstanding read");
  // A requester keeps its request steady until it is accepted.
  for (genvar g = 0; g < NM; g++) begin : g_stable
    a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                   s_req_valid[g] && !s_req_ready[g] |=> s_req_valid[g])
      else $error("mem_arbiter: request %0d withdrawn before acceptance", g);
  end

endmodule
