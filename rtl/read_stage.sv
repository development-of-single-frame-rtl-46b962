// read_stage: the first stage of a drawing unit (the document's ReadData).
//
// For every line i of a sprite (0 <= i < h) it reads the w/2 words of
// sprite line i, sp[i*(w/2) + j], and then the w/2 words of the previous
// screen under it, scp[(i+y)*(GAME_DW/2) + x/2 + j], and stores them in the
// sprite line buffer and the screen line buffer at index j. Sprite reads come
// first and screen reads second, as in the document, so the stage needs only
// one memory port. In erase mode it does nothing and reports done at once,
// as the document's ReadData returns.
//
// Requests are issued back to back as long as the port accepts them; the
// responses, which come back in order, are counted to know which buffer and
// index each one belongs to. A line is filled into one bank of the double
// buffer; before starting a line the stage waits until that bank is free
// (bank_free), and after the last response it pulses line_filled and moves
// to the other bank. The addressing follows the document; the handshakes
// and the bank scheme are this design's choices.
//
// Interface: start (one-cycle pulse) with cmd latched by the caller and held
// stable; done pulses for one cycle when all lines have been read. The
// stage only reads, so the write flag and write data of its requests are
// constant 0, and it does not use cmd.scn.
module read_stage
  import sprite_pkg::*;
#(
  parameter int unsigned GAME_DW = GAME_DW_DEF,  // screen width in pixels
  parameter int unsigned MAX_SPW = MAX_SPW_DEF,  // widest sprite in pixels
  parameter int unsigned NBANK   = 2             // line buffer banks
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  input  draw_cmd_t                        cmd,
  output logic                             busy,
  output logic                             done,
  // memory port (reads only)
  output logic                             req_valid,
  output mem_req_t                         req,
  input  logic                             req_ready,
  input  logic                             rsp_valid,
  input  word_t                            rsp_rdata,
  // line buffer write side
  output logic                             sl_we,
  output logic                             scl_we,
  output logic [$clog2(NBANK)-1:0]         buf_bank,
  output logic [$clog2(MAX_SPW/2)-1:0]     buf_idx,
  output word_t                            buf_wdata,
  input  logic                             bank_free,    // buf_bank may be filled
  output logic                             line_filled   // buf_bank now holds a line
);

  localparam int unsigned BW = $clog2(NBANK);
  localparam int unsigned IW = $clog2(MAX_SPW/2);
  localparam int unsigned CW = IW + 2;  // counts up to w = MAX_SPW words

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_READ} state_e;

  state_e       state;
  dim_t         line;       // i
  logic [CW-1:0]  n_issued;   // requests issued in this line, 0..w-1
  logic [CW-1:0]  n_recv;     // responses received in this line
  logic [BW-1:0] bank;
  dim_t         half_w;     // w/2, words per line of each buffer
  logic [CW-1:0]  words2;     // w: words per line over both buffers
  logic [CW-1:0]  scr_j;

  assign half_w = cmd.w >> 1;
  assign words2 = CW'(half_w) << 1;
  assign scr_j  = n_issued - CW'(half_w);

  // Request address for the n_issued-th read of the line.
  always_comb begin
    req.we    = 1'b0;
    req.wdata = '0;
    if (n_issued < CW'(half_w))
      req.addr = cmd.sp + addr_t'(line) * addr_t'(half_w) + addr_t'(n_issued);
    else
      req.addr = cmd.scp + (addr_t'(line) + addr_t'(cmd.y)) * addr_t'(GAME_DW / 2)
               + (addr_t'(cmd.x) >> 1) + addr_t'(scr_j);
  end

  assign req_valid = (state == S_READ) && (n_issued < words2);
  assign busy      = (state != S_IDLE);

  // Responses go straight into the line buffers.
  assign buf_bank  = bank;
  assign buf_wdata = rsp_rdata;
  always_comb begin
    sl_we   = 1'b0;
    scl_we  = 1'b0;
    buf_idx = '0;
    if (rsp_valid) begin
      if (n_recv < CW'(half_w)) begin
        sl_we   = 1'b1;
        buf_idx = IW'(n_recv);
      end else begin
        scl_we  = 1'b1;
        buf_idx = IW'(n_recv - CW'(half_w));
      end
    end
  end

  logic last_rsp;
  assign last_rsp = rsp_valid && (n_recv == words2 - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      line        <= '0;
      n_issued    <= '0;
      n_recv      <= '0;
      bank        <= '0;
      done        <= 1'b0;
      line_filled <= 1'b0;
    end else begin
      done        <= 1'b0;
      line_filled <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            line     <= '0;
            n_issued <= '0;
            n_recv   <= '0;
            bank     <= '0;
            if (cmd.mode == MODE_ERASE || cmd.h == '0 || half_w == '0)
              done <= 1'b1;
            else
              state <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (bank_free) state <= S_READ;
        end
        S_READ: begin
          if (req_valid && req_ready) n_issued <= n_issued + 1'b1;
          if (rsp_valid) n_recv <= n_recv + 1'b1;
          if (last_rsp) begin
            line_filled <= 1'b1;
            bank        <= (int'(bank) == NBANK - 1) ? '0 : bank + 1'b1;
            n_issued    <= '0;
            n_recv      <= '0;
            line        <= line + 1'b1;
            if (line == cmd.h - 1'b1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_WAIT;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Sprites wider than the line buffers are not supported.
  a_width: assert property (@(posedge clk) disable iff (!rst_n)
                            start && cmd.mode == MODE_DRAW |-> cmd.w <= dim_t'(MAX_SPW))
    else $error("read_stage: sprite width %0d exceeds MAX_SPW", cmd.w);

endmodule
