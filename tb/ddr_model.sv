// ddr_model: behavioural model of the shared DDR3 SDRAM as seen through NP
// memory ports (simulation only, not synthesizable).
//
// It holds WORDS 64-bit words shared by all ports. A request on port k is
// accepted at a clock edge when req_valid[k] and req_ready[k] are both
// high. Each cycle every port's req_ready is drawn at random, low with
// probability stall_pct percent, and at most max_per_cycle ports (rotating)
// are ready at once, which models waiting for the shared memory. Writes take
// effect when accepted; when several ports are accepted in one cycle they
// are applied in port order. Reads are answered on their own port in
// request order, LAT cycles after acceptance, with the data the word held
// when the read was accepted. Testbenches load and inspect the contents
// through the mem array.
module ddr_model
  import sprite_pkg::*;
#(
  parameter int unsigned NP        = 1,     // number of ports
  parameter int unsigned WORDS     = 4096,  // size in 64-bit words
  parameter int unsigned LAT       = 6,     // read latency in cycles
  parameter int unsigned STALL_PCT = 20     // initial stall probability (%)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic     [NP-1:0]    req_valid,
  input  mem_req_t [NP-1:0]    req,
  output logic     [NP-1:0]    req_ready,
  output logic     [NP-1:0]    rsp_valid,
  output word_t    [NP-1:0]    rsp_rdata
);

  typedef struct {
    longint unsigned due;
    word_t           data;
  } pending_t;

  word_t           mem [WORDS];
  pending_t        pend [NP][$];
  longint unsigned cycle;
  int unsigned     stall_pct = STALL_PCT;
  int unsigned     max_per_cycle = NP;
  int unsigned     rot;
  longint unsigned n_stalls;   // port-cycles a request waited
  longint unsigned n_reads;
  longint unsigned n_writes;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_ready <= '0;
      rsp_valid <= '0;
      rsp_rdata <= '0;
      cycle     <= 0;
      rot       <= 0;
      n_stalls  <= 0;
      n_reads   <= 0;
      n_writes  <= 0;
      for (int k = 0; k < NP; k++) pend[k].delete();
    end else begin
      automatic int unsigned granted = 0;
      automatic longint unsigned st = n_stalls, rd = n_reads, wr = n_writes;
      cycle <= cycle + 1;
      rot   <= (rot + 1) % NP;
      for (int n = 0; n < NP; n++) begin
        automatic int k = (rot + n) % NP;
        if (granted < max_per_cycle && $urandom_range(99) >= stall_pct) begin
          req_ready[k] <= 1'b1;
          granted++;
        end else req_ready[k] <= 1'b0;
      end
      for (int k = 0; k < NP; k++) begin
        if (req_valid[k] && !req_ready[k]) st++;
        if (req_valid[k] && req_ready[k]) begin
          if (req[k].addr >= WORDS) begin
            $error("ddr_model: address %0d out of range on port %0d", req[k].addr, k);
          end else if (req[k].we) begin
            mem[req[k].addr] = req[k].wdata;
            wr++;
          end else begin
            pend[k].push_back('{due: cycle + longint'(LAT), data: mem[req[k].addr]});
            rd++;
          end
        end
        rsp_valid[k] <= 1'b0;
        if (pend[k].size() > 0 && pend[k][0].due <= cycle) begin
          rsp_valid[k] <= 1'b1;
          rsp_rdata[k] <= pend[k][0].data;
          void'(pend[k].pop_front());
        end
      end
      n_stalls <= st;
      n_reads  <= rd;
      n_writes <= wr;
    end
  end

endmodule
