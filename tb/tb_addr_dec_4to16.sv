// tb_addr_dec_4to16: exhaustive check of the S-box wordline decoder.
// For every nibble and both enable values, the wordlines must be exactly
// the one-hot code of the nibble (enable high) or all low (enable low).
module tb_addr_dec_4to16;
  logic        en;
  logic [3:0]  a;
  logic [15:0] wl;
  int checks = 0, failures = 0;

  addr_dec_4to16 dut (.en, .a, .wl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 16; v++) begin
        logic [15:0] exp;
        en  = e[0];
        a   = v[3:0];
        #1;
        exp = e[0] ? (16'd1 << v) : 16'd0;
        checks++;
        if (wl !== exp) begin
          failures++;
          $display("FAIL en=%0d a=%0d wl=%h exp=%h", en, a, wl, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
