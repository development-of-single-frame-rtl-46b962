// pixel_composite: merges a word of sprite pixels over a word of screen
// pixels.
//
// Each 64-bit word carries two 32-bit pixels. For each pixel position the
// sprite pixel is taken when it is not 0, and the screen pixel shows through
// when the sprite pixel is 0 (the transparent colour). A two-way multiplexer
// controlled by the mode then selects the merged word (draw mode) or the
// constant 0 (erase mode), which fills the screen with transparent pixels.
// The merge rule and the 0/1 mode multiplexer follow the document; the block
// is purely combinational, with no latency.
module pixel_composite
  import sprite_pkg::*;
(
  input  word_t sprite_word,  // two pixels of the sprite line
  input  word_t screen_word,  // two pixels of the previous screen line
  input  mode_e mode,         // MODE_DRAW: merge, MODE_ERASE: output 0
  output word_t out_word      // two pixels for the new screen
);

  word_t merged;

  always_comb begin
    for (int p = 0; p < WORD_W / PIX_W; p++) begin
      if (sprite_word[p*PIX_W +: PIX_W] != '0)
        merged[p*PIX_W +: PIX_W] = sprite_word[p*PIX_W +: PIX_W];
      else
        merged[p*PIX_W +: PIX_W] = screen_word[p*PIX_W +: PIX_W];
    end
    out_word = (mode == MODE_ERASE) ? '0 : merged;
  end

endmodule
