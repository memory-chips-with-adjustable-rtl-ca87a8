// tb_vawi_rw_ctrl: self-checking test of the chip read/write control.
// Walks the whole truth table of chip select and write enable.
module tb_vawi_rw_ctrl;
  int checks = 0, failures = 0;
  logic s, w_n, access, wr, rd;

  vawi_rw_ctrl dut (.s(s), .w_n(w_n), .access(access), .wr(wr), .rd(rd));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // {s, w_n} -> {access, wr, rd}
    logic [2:0] exp [4] = '{3'b000, 3'b000, 3'b110, 3'b101};
    for (int v = 0; v < 4; v++) begin
      {s, w_n} = 2'(v);
      #1;
      checks++;
      if ({access, wr, rd} !== exp[v]) begin
        failures++;
        $display("FAIL s=%b w_n=%b: access/wr/rd=%b%b%b exp %b", s, w_n, access, wr, rd, exp[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
