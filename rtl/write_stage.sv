// write_stage: the second stage of a drawing unit (the document's loop L13).
//
// For every line i (0 <= i < h) and word j (0 <= j < w/2) it writes
// scn[(i+y)*(GAME_DW/2) + x/2 + j]. In draw mode the word written is the
// composite of sprite line buffer word j over screen line buffer word j
// (pixel_composite); in erase mode it is 0, the transparent colour, and the
// line buffers are not used, so an erase can cover a rectangle of any width
// up to the whole screen. The addressing and the merge follow the document.
//
// In draw mode the stage waits before each line until the bank it reads is
// filled (bank_ready), and pulses line_drained after the line's last write
// so the read stage may refill that bank; the banks are taken in turn. One
// write is offered per cycle, so with a port that never stalls a line of w/2
// words takes w/2 cycles, and an erase of h lines h*w/2 cycles plus two.
//
// Interface: start (one-cycle pulse) with cmd held stable by the caller;
// done pulses for one cycle after the last write has been accepted. The
// stage only writes, so the write flag of its requests is constant 1, and
// it does not use cmd.sp or cmd.scp.
module write_stage
  import sprite_pkg::*;
#(
  parameter int unsigned GAME_DW = GAME_DW_DEF,  // screen width in pixels
  parameter int unsigned MAX_SPW = MAX_SPW_DEF,  // widest sprite in pixels
  parameter int unsigned NBANK   = 2             // line buffer banks
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  draw_cmd_t                    cmd,
  output logic                         busy,
  output logic                         done,
  // memory port (writes only)
  output logic                         req_valid,
  output mem_req_t                     req,
  input  logic                         req_ready,
  // line buffer read side
  output logic [$clog2(NBANK)-1:0]     buf_bank,
  output logic [$clog2(MAX_SPW/2)-1:0] buf_idx,
  input  word_t                        sl_rdata,
  input  word_t                        scl_rdata,
  input  logic                         bank_ready,   // buf_bank holds a line
  output logic                         line_drained  // buf_bank may be refilled
);

  localparam int unsigned BW = $clog2(NBANK);
  localparam int unsigned IW = $clog2(MAX_SPW/2);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_WRITE} state_e;

  state_e        state;
  dim_t          line;   // i
  dim_t          j;      // word within the line
  logic [BW-1:0] bank;
  dim_t          half_w;
  logic          last_word;

  assign half_w    = cmd.w >> 1;
  assign last_word = (j == half_w - 1'b1);
  assign busy      = (state != S_IDLE);
  assign buf_bank  = bank;
  assign buf_idx   = IW'(j);

  pixel_composite u_composite (
    .sprite_word (sl_rdata),
    .screen_word (scl_rdata),
    .mode        (cmd.mode),
    .out_word    (req.wdata)
  );

  assign req.we    = 1'b1;
  assign req.addr  = cmd.scn + (addr_t'(line) + addr_t'(cmd.y)) * addr_t'(GAME_DW / 2)
                   + (addr_t'(cmd.x) >> 1) + addr_t'(j);
  assign req_valid = (state == S_WRITE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      line         <= '0;
      j            <= '0;
      bank         <= '0;
      done         <= 1'b0;
      line_drained <= 1'b0;
    end else begin
      done         <= 1'b0;
      line_drained <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            line <= '0;
            j    <= '0;
            bank <= '0;
            if (cmd.h == '0 || half_w == '0)
              done <= 1'b1;
            else if (cmd.mode == MODE_ERASE)
              state <= S_WRITE;
            else
              state <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (bank_ready) state <= S_WRITE;
        end
        S_WRITE: begin
          if (req_ready) begin
            j <= j + 1'b1;
            if (last_word) begin
              j    <= '0;
              line <= line + 1'b1;
              if (cmd.mode == MODE_DRAW) begin
                line_drained <= 1'b1;
                bank         <= (int'(bank) == NBANK - 1) ? '0 : bank + 1'b1;
              end
              if (line == cmd.h - 1'b1) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else if (cmd.mode == MODE_DRAW) begin
                state <= S_WAIT;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
