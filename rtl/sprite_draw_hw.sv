// sprite_draw_hw: one sprite drawing unit (the document's SpriteDrawHW).
//
// A call either fills a rectangle of the sprite screen with the transparent
// colour (mode = MODE_ERASE) or draws one sprite onto it (mode = MODE_DRAW).
// Drawing goes line by line: the read stage copies sprite line i and the
// screen line under it into two line buffers (sp_line, sc_line), and the
// write stage merges them pixel by pixel (a non-zero sprite pixel replaces
// the screen pixel) and writes the line to the new screen. Both stages and
// the whole memory traffic share one memory master port, D0, through a
// two-way round-robin arbiter. Each word carries two pixels. This
// organisation follows the document.
//
// The document runs the two stages concurrently (dataflow). Here each line
// buffer has two banks: while the write stage drains line i from one bank,
// the read stage fills line i+1 into the other. A bank is marked full when
// the read stage has filled it and free when the write stage has drained it;
// the bank flags and the arbiter scheme are this design's choices.
//
// Interface: when idle, a one-cycle start pulse latches cmd; busy stays high
// until the call has finished, and done pulses for one cycle when the last
// write has been accepted by the memory port. Writes are posted, so the
// memory must apply writes and reads in the order it accepts them.
module sprite_draw_hw
  import sprite_pkg::*;
#(
  parameter int unsigned GAME_DW   = GAME_DW_DEF,  // screen width in pixels
  parameter int unsigned MAX_SPW   = MAX_SPW_DEF,  // widest sprite in pixels
  parameter int unsigned MAX_OUTST = 16            // outstanding reads on D0
) (
  input  logic      clk,
  input  logic      rst_n,
  // control (the caller's arguments)
  input  logic      start,
  input  draw_cmd_t cmd,
  output logic      busy,
  output logic      done,
  // memory master port D0
  output logic      m_req_valid,
  output mem_req_t  m_req,
  input  logic      m_req_ready,
  input  logic      m_rsp_valid,
  input  word_t     m_rsp_rdata
);

  localparam int unsigned NBANK = 2;
  localparam int unsigned BW    = $clog2(NBANK);
  localparam int unsigned IW    = $clog2(MAX_SPW/2);

  draw_cmd_t cmd_q;
  logic      running, go, rd_done_q, wr_done_q;
  logic      rd_busy, rd_done, wr_busy, wr_done;
  logic      stages_idle;

  // Call control.
  assign go   = start && !running;
  assign busy = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_q     <= '0;
      running   <= 1'b0;
      rd_done_q <= 1'b0;
      wr_done_q <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (go) begin
        cmd_q     <= cmd;
        running   <= 1'b1;
        rd_done_q <= 1'b0;
        wr_done_q <= 1'b0;
      end else if (running) begin
        if (rd_done) rd_done_q <= 1'b1;
        if (wr_done) wr_done_q <= 1'b1;
        if ((rd_done_q || rd_done) && (wr_done_q || wr_done)) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  // Both stages start one cycle after the call, from the latched command.
  logic stage_start;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stage_start <= 1'b0;
    else        stage_start <= go;
  end

  // Line buffers.
  logic              sl_we, scl_we, line_filled, line_drained;
  logic [BW-1:0]     rd_bank, wr_bank;
  logic [IW-1:0]     rd_idx, wr_idx;
  word_t             buf_wdata, sl_rdata, scl_rdata;
  logic [NBANK-1:0]  full;
  logic [BW-1:0]     fill_ptr, drain_ptr;

  line_buffer #(.DEPTH(MAX_SPW/2), .NBANK(NBANK)) u_sp_line (
    .clk, .we(sl_we), .wbank(rd_bank), .waddr(rd_idx), .wdata(buf_wdata),
    .rbank(wr_bank), .raddr(wr_idx), .rdata(sl_rdata)
  );
  line_buffer #(.DEPTH(MAX_SPW/2), .NBANK(NBANK)) u_sc_line (
    .clk, .we(scl_we), .wbank(rd_bank), .waddr(rd_idx), .wdata(buf_wdata),
    .rbank(wr_bank), .raddr(wr_idx), .rdata(scl_rdata)
  );

  // Bank flags: set when a line has been read in, cleared when written out.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full      <= '0;
      fill_ptr  <= '0;
      drain_ptr <= '0;
    end else if (go) begin
      full      <= '0;
      fill_ptr  <= '0;
      drain_ptr <= '0;
    end else begin
      if (line_filled) begin
        full[fill_ptr] <= 1'b1;
        fill_ptr       <= (int'(fill_ptr) == NBANK - 1) ? '0 : fill_ptr + 1'b1;
      end
      if (line_drained) begin
        full[drain_ptr] <= 1'b0;
        drain_ptr       <= (int'(drain_ptr) == NBANK - 1) ? '0 : drain_ptr + 1'b1;
      end
    end
  end

  // Stages.
  mem_req_t         arb_req [2];
  logic [1:0]       arb_ready, arb_rsp_valid;
  word_t            arb_rsp_rdata;
  logic     rd_req_valid, rd_req_ready, rd_rsp_valid;
  logic     wr_req_valid, wr_req_ready;
  mem_req_t rd_req, wr_req;

  read_stage #(.GAME_DW(GAME_DW), .MAX_SPW(MAX_SPW), .NBANK(NBANK)) u_read (
    .clk, .rst_n,
    .start       (stage_start),
    .cmd         (cmd_q),
    .busy        (rd_busy),
    .done        (rd_done),
    .req_valid   (rd_req_valid),
    .req         (rd_req),
    .req_ready   (rd_req_ready),
    .rsp_valid   (rd_rsp_valid),
    .rsp_rdata   (arb_rsp_rdata),
    .sl_we, .scl_we,
    .buf_bank    (rd_bank),
    .buf_idx     (rd_idx),
    .buf_wdata,
    .bank_free   (!full[rd_bank]),
    .line_filled
  );

  write_stage #(.GAME_DW(GAME_DW), .MAX_SPW(MAX_SPW), .NBANK(NBANK)) u_write (
    .clk, .rst_n,
    .start       (stage_start),
    .cmd         (cmd_q),
    .busy        (wr_busy),
    .done        (wr_done),
    .req_valid   (wr_req_valid),
    .req         (wr_req),
    .req_ready   (wr_req_ready),
    .buf_bank    (wr_bank),
    .buf_idx     (wr_idx),
    .sl_rdata, .scl_rdata,
    .bank_ready  (full[wr_bank]),
    .line_drained
  );

  // Bus D0: requester 0 is the read stage, requester 1 the write stage.

  assign arb_req[0]   = rd_req;
  assign arb_req[1]   = wr_req;
  assign rd_req_ready = arb_ready[0];
  assign wr_req_ready = arb_ready[1];
  assign rd_rsp_valid = arb_rsp_valid[0];

  mem_arbiter #(.NM(2), .MAX_OUTST(MAX_OUTST)) u_d0 (
    .clk, .rst_n,
    .s_req_valid ({wr_req_valid, rd_req_valid}),
    .s_req       (arb_req),
    .s_req_ready (arb_ready),
    .s_rsp_valid (arb_rsp_valid),
    .s_rsp_rdata (arb_rsp_rdata),
    .m_req_valid, .m_req, .m_req_ready, .m_rsp_valid,
    .m_rsp_rdata
  );

  // Neither stage may still be working once the unit reports done.
  assign stages_idle = !rd_busy && !wr_busy;
  a_idle_when_done: assert property (@(posedge clk) disable iff (!rst_n) done |-> stages_idle)
    else $error("sprite_draw_hw: done while a stage is busy");

  // The write stage never reads, so no response may be routed to it.
  a_no_write_rsp: assert property (@(posedge clk) disable iff (!rst_n) !arb_rsp_valid[1])
    else $error("sprite_draw_hw: read response routed to the write stage");

endmodule
