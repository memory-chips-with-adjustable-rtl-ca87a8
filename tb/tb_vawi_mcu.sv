// tb_vawi_mcu: self-checking test of the mode control unit, both schemes.
//
// Applies every input combination and compares MC4..MC1 and the width with
// the value tables written out by hand below (dedicated 3-pin code table and
// the table of the single mode pin combined with address pins A19..A16).
module tb_vawi_mcu;
  import vawi_pkg::*;

  int checks = 0, failures = 0;

  logic [2:0] enc_pins;
  logic [0:0] sh_pin;
  logic [3:0] enc_hi, sh_hi;
  logic [3:0] enc_mc, sh_mc;
  logic [2:0] enc_wl, sh_wl;

  vawi_mcu #(.K(16), .SCHEME(MCU_ENCODED)) u_enc (
    .mode_pins(enc_pins), .addr_hi(enc_hi), .mc(enc_mc), .width_log2(enc_wl));
  vawi_mcu #(.K(16), .SCHEME(MCU_SHARED)) u_sh (
    .mode_pins(sh_pin), .addr_hi(sh_hi), .mc(sh_mc), .width_log2(sh_wl));

  // expected MC4..MC1 and log2(width) of the encoded scheme, code 0..4
  logic [3:0] enc_tab_mc [5] = '{4'b0000, 4'b1000, 4'b1100, 4'b1110, 4'b1111};
  int         enc_tab_wl [5] = '{4, 3, 2, 1, 0};

  task automatic check(string what, logic [3:0] got_mc, logic [3:0] exp_mc,
                       int got_wl, int exp_wl);
    checks++;
    if (got_mc !== exp_mc || got_wl != exp_wl) begin
      failures++;
      $display("FAIL %s: mc=%b (exp %b) width_log2=%0d (exp %0d)", what, got_mc, exp_mc,
               got_wl, exp_wl);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enc_hi = '0;
    // dedicated pins: codes 0..4, address bits must not matter
    for (int c = 0; c < 5; c++) begin
      for (int h = 0; h < 16; h++) begin
        enc_pins = 3'(c);
        enc_hi   = 4'(h);
        #1;
        check($sformatf("encoded code %0d hi %0h", c, h), enc_mc, enc_tab_mc[c],
              int'(enc_wl), enc_tab_wl[c]);
      end
    end
    // unused codes 5..7 are treated as the 1-bit configuration
    for (int c = 5; c < 8; c++) begin
      enc_pins = 3'(c);
      #1;
      check($sformatf("encoded code %0d", c), enc_mc, 4'b1111, int'(enc_wl), 0);
    end

    // shared scheme: sh_hi = {A19, A18, A17, A16}
    for (int h = 0; h < 16; h++) begin
      logic [3:0] emc;
      int ewl;
      sh_pin = 1'b0;
      sh_hi  = 4'(h);
      #1;
      check($sformatf("shared M=0 hi %0h", h), sh_mc, 4'b1111, int'(sh_wl), 0);
      sh_pin = 1'b1;
      #1;
      casez (4'(h))
        4'b0???: begin emc = 4'b1110; ewl = 1; end
        4'b10??: begin emc = 4'b1100; ewl = 2; end
        4'b110?: begin emc = 4'b1000; ewl = 3; end
        default: begin emc = 4'b0000; ewl = 4; end
      endcase
      check($sformatf("shared M=1 hi %0h", h), sh_mc, emc, int'(sh_wl), ewl);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
