// tb_addr_dec_6to40: exhaustive check of the round wordline decoder.
// All 64 addresses with enable high and low: addresses below 40 give a
// one-hot wordline, 40..63 and enable low give none.
module tb_addr_dec_6to40;
  localparam int N = 40;
  logic         en;
  logic [5:0]   a;
  logic [N-1:0] wl;
  int checks = 0, failures = 0;

  addr_dec_6to40 dut (.en, .a, .wl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 64; v++) begin
        logic [N-1:0] exp;
        en = e[0];
        a  = v[5:0];
        #1;
        exp = '0;
        if (e == 1 && v < N) exp[v] = 1'b1;
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
