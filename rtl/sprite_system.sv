// sprite_system: several sprite drawing units working on one sprite screen.
//
// Single-frame sprite drawing: each frame, the sprite screen is first
// filled with the transparent colour and then every sprite is drawn onto it
// in priority order, lowest priority first. With N_UNITS drawing units the
// host splits the erase of the screen among the units (one horizontal band
// each) and hands each unit its own sprites, so up to N_UNITS sprites are
// drawn at once. This arrangement follows the document, which evaluates one,
// two and three units; three is the default here.
//
// Each unit keeps its own memory master port, as each synthesized drawing
// block has its own bus master; the ports are brought out side by side
// (index u belongs to unit u) and meet only in the memory system, the
// shared DDR3 SDRAM, which is not part of this RTL. A memory port must
// accept requests with a valid/ready handshake, apply them in the order
// accepted and return read data on the same port in request order, one
// word per read with m_rsp_valid high for one cycle. Each unit also has its
// own control port: start, cmd, busy and done as in sprite_draw_hw. The
// host (a processor, not part of this RTL) issues the commands.
//
// Drawing order between units is not coordinated: where sprites handled by
// different units overlap, the result depends on timing, so the host should
// give overlapping sprites to the same unit (for example by giving each unit
// a band of the screen), and should let all units finish erasing before any
// unit draws across a band boundary.
module sprite_system
  import sprite_pkg::*;
#(
  parameter int unsigned N_UNITS   = 3,            // drawing units
  parameter int unsigned GAME_DW   = GAME_DW_DEF,  // screen width in pixels
  parameter int unsigned MAX_SPW   = MAX_SPW_DEF,  // widest sprite in pixels
  parameter int unsigned MAX_OUTST = 16            // outstanding reads per unit
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // per-unit control
  input  logic      [N_UNITS-1:0]  start,
  input  draw_cmd_t [N_UNITS-1:0]  cmd,
  output logic      [N_UNITS-1:0]  busy,
  output logic      [N_UNITS-1:0]  done,
  // per-unit memory master ports towards the DDR3 SDRAM
  output logic      [N_UNITS-1:0]  m_req_valid,
  output mem_req_t  [N_UNITS-1:0]  m_req,
  input  logic      [N_UNITS-1:0]  m_req_ready,
  input  logic      [N_UNITS-1:0]  m_rsp_valid,
  input  word_t     [N_UNITS-1:0]  m_rsp_rdata
);

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    sprite_draw_hw #(
      .GAME_DW(GAME_DW), .MAX_SPW(MAX_SPW), .MAX_OUTST(MAX_OUTST)
    ) u_hw (
      .clk, .rst_n,
      .start       (start[u]),
      .cmd         (cmd[u]),
      .busy        (busy[u]),
      .done        (done[u]),
      .m_req_valid (m_req_valid[u]),
      .m_req       (m_req[u]),
      .m_req_ready (m_req_ready[u]),
      .m_rsp_valid (m_rsp_valid[u]),
      .m_rsp_rdata (m_rsp_rdata[u])
    );
  end

endmodule
