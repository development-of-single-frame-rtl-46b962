// tb_pixel_composite: self-checking test of the pixel merge.
//
// Drives random sprite and screen words, with each pixel forced to 0 (the
// transparent colour) about a third of the time, in both modes, and checks
// every output pixel against the rule worked out here: erase gives 0, draw
// gives the sprite pixel unless it is 0, then the screen pixel.
module tb_pixel_composite;
  import sprite_pkg::*;

  word_t sp_w, sc_w, out_w;
  mode_e mode;
  int    checks = 0, failures = 0;
  int    n_transparent = 0, n_opaque = 0;

  pixel_composite dut (.sprite_word(sp_w), .screen_word(sc_w), .mode(mode), .out_word(out_w));

  function automatic pixel_t rand_pix();
    return ($urandom_range(2) == 0) ? '0 : pixel_t'($urandom);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      pixel_t s0, s1, c0, c1, e0, e1;
      s0 = rand_pix(); s1 = rand_pix(); c0 = rand_pix(); c1 = rand_pix();
      sp_w = {s1, s0};
      sc_w = {c1, c0};
      mode = (t % 4 == 3) ? MODE_ERASE : MODE_DRAW;
      #1;
      if (mode == MODE_ERASE) begin
        e0 = '0; e1 = '0;
      end else begin
        e0 = (s0 == 0) ? c0 : s0;
        e1 = (s1 == 0) ? c1 : s1;
        if (s0 == 0) n_transparent++; else n_opaque++;
      end
      checks++;
      if (out_w !== {e1, e0}) begin
        failures++;
        if (failures < 10)
          $display("mismatch: sp=%h sc=%h mode=%0d out=%h exp=%h", sp_w, sc_w, mode, out_w, {e1, e0});
      end
    end
    checks++;
    if (n_transparent == 0 || n_opaque == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
