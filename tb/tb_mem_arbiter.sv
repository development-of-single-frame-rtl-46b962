// tb_mem_arbiter: self-checking test of the round-robin memory arbiter.
//
// Three requesters issue random reads and writes, each in its own address
// region, through the arbiter to a memory model with random stalls. A copy
// of the memory kept here, updated in the order requests are accepted,
// gives the data each read must return; every response is checked to reach
// the requester that asked, in order, with that data. Fairness is checked
// too: while a requester waits, no more than NM-1 other requests may be
// accepted. The test also makes sure that the outstanding-read limit was
// reached and that requesters competed for the port.
module tb_mem_arbiter;
  import sprite_pkg::*;

  localparam int unsigned NM        = 3;
  localparam int unsigned MAX_OUTST = 4;
  localparam int unsigned REGION    = 64;
  localparam int unsigned WORDS     = NM * REGION;

  logic            clk = 0, rst_n = 0;
  logic [NM-1:0]   s_req_valid, s_req_ready, s_rsp_valid;
  mem_req_t        s_req [NM];
  word_t           s_rsp_rdata;
  logic            m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t        m_req;
  word_t           m_rsp_rdata;

  int checks = 0, failures = 0;
  int n_full = 0, n_contention = 0, n_resp = 0;

  mem_arbiter #(.NM(NM), .MAX_OUTST(MAX_OUTST)) dut (.*);

  ddr_model #(.WORDS(WORDS), .LAT(5), .STALL_PCT(25)) u_mem (
    .clk, .rst_n, .req_valid(m_req_valid), .req(m_req), .req_ready(m_req_ready),
    .rsp_valid(m_rsp_valid), .rsp_rdata(m_rsp_rdata)
  );

  always #5 clk = ~clk;

  word_t mirror [WORDS];
  word_t expq [NM][$];
  int    waiting [NM];
  int    issued [NM];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mem_req_t new_req(int m);
    mem_req_t r;
    r.we    = 1'($urandom_range(2) == 0);
    r.addr  = addr_t'(m * REGION + $urandom_range(REGION - 1));
    r.wdata = {$urandom, $urandom};
    return r;
  endfunction

  initial begin
    for (int a = 0; a < WORDS; a++) begin
      mirror[a] = {$urandom, $urandom};
      u_mem.mem[a] = mirror[a];
    end
    s_req_valid = '0;
    for (int m = 0; m < NM; m++) begin
      s_req[m] = new_req(m);
      waiting[m] = 0;
      issued[m] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  // Requesters and checker, all sampled just before the clock edge.
  always @(posedge clk) begin
    if (rst_n) begin
      int n_valid;
      n_valid = 0;
      for (int m = 0; m < NM; m++) if (s_req_valid[m]) n_valid++;
      if (n_valid > 1) n_contention++;
      if (|s_req_valid && !m_req_valid) n_full++;
      // responses
      for (int m = 0; m < NM; m++) begin
        if (s_rsp_valid[m]) begin
          checks++;
          n_resp++;
          if (expq[m].size() == 0) begin
            failures++;
            $display("unexpected response to requester %0d", m);
          end else begin
            word_t e;
            e = expq[m].pop_front();
            if (s_rsp_rdata !== e) begin
              failures++;
              $display("requester %0d got %h, expected %h", m, s_rsp_rdata, e);
            end
          end
        end
      end
      // acceptances
      for (int m = 0; m < NM; m++) begin
        if (s_req_valid[m] && s_req_ready[m]) begin
          checks++;
          if (!(m_req_valid && m_req_ready && m_req == s_req[m])) begin
            failures++;
            $display("requester %0d accepted but not forwarded", m);
          end
          if (s_req[m].we) mirror[s_req[m].addr] = s_req[m].wdata;
          else             expq[m].push_back(mirror[s_req[m].addr]);
          issued[m]++;
          waiting[m] = 0;
          for (int o = 0; o < NM; o++)
            if (o != m && s_req_valid[o]) begin
              waiting[o]++;
              checks++;
              if (waiting[o] > NM - 1) begin
                failures++;
                $display("requester %0d starved", o);
              end
            end
        end
      end
      // new requests
      for (int m = 0; m < NM; m++) begin
        if (!s_req_valid[m] || s_req_ready[m]) begin
          if (s_req_valid[m]) s_req[m] <= new_req(m);
          s_req_valid[m] <= (issued[m] + (s_req_valid[m] ? 1 : 0) < 400) && ($urandom_range(9) < 8);
        end
      end
    end
  end

  initial begin
    wait (rst_n);
    wait (issued[0] >= 400 && issued[1] >= 400 && issued[2] >= 400);
    repeat (40) @(posedge clk);
    for (int m = 0; m < NM; m++) begin
      checks++;
      if (expq[m].size() != 0) begin
        failures++;
        $display("requester %0d still awaits %0d responses", m, expq[m].size());
      end
    end
    checks++;
    if (n_full == 0 || n_contention == 0 || n_resp == 0) begin
      failures++;
      $display("coverage: full=%0d contention=%0d responses=%0d", n_full, n_contention, n_resp);
    end
    $display("responses=%0d contention cycles=%0d fifo-full cycles=%0d", n_resp, n_contention, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
