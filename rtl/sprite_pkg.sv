// sprite_pkg: types and constants shared by the sprite drawing hardware.
//
// A sprite screen and a sprite image are arrays of 32-bit pixels stored two
// to a 64-bit memory word (the lower pixel in bits 31:0, the upper one in
// bits 63:32). The pixel value 0 is the transparent colour. Memory
// addresses are 64-bit word addresses, i.e. indices into an array of 64-bit
// words, as the pointers of the drawing function are. The screen width
// (1280), screen height (720) and sprite size (64) follow the document's
// test system; the 32-bit address width, the request structure of the memory
// bus and the command structure are this design's own choices.
package sprite_pkg;

  localparam int unsigned PIX_W  = 32;  // bits per pixel
  localparam int unsigned WORD_W = 64;  // bits per memory word: two pixels
  localparam int unsigned ADDR_W = 32;  // word address width
  localparam int unsigned DIM_W  = 16;  // width of coordinates and sizes

  localparam int unsigned GAME_DW_DEF = 1280;  // screen width in pixels
  localparam int unsigned GAME_DH_DEF = 720;   // screen height in lines
  localparam int unsigned MAX_SPW_DEF = 64;    // widest sprite line in pixels

  typedef logic [PIX_W-1:0]  pixel_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DIM_W-1:0]  dim_t;

  // What a unit does with its command: composite a sprite, or fill a
  // rectangle with the transparent colour.
  typedef enum logic {
    MODE_DRAW  = 1'b0,
    MODE_ERASE = 1'b1
  } mode_e;

  // Arguments of one drawing call. sp: first word of the sprite image
  // (h lines of w/2 words each). scp: first word of the previous sprite
  // screen. scn: first word of the screen being written. x, y: top-left
  // pixel on the screen (x even). w, h: size in pixels (w even).
  typedef struct packed {
    addr_t sp;
    addr_t scp;
    addr_t scn;
    dim_t  x;
    dim_t  y;
    dim_t  w;
    dim_t  h;
    mode_e mode;
  } draw_cmd_t;

  // One request on a memory port. A read returns one word on the response
  // channel, in request order; a write returns nothing.
  typedef struct packed {
    logic  we;
    addr_t addr;
    word_t wdata;
  } mem_req_t;

endpackage
