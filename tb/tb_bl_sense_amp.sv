// tb_bl_sense_amp: truth tables of the XOR (dual) and read-out sense amplifiers.
// XOR mode: AND SA fires for two conducting cells, NOR SA for none, output
// is their NOR (the document's Table 4.2). Read-out mode: output is the
// single cell's state. Everything is 0 without the read pulse.
module tb_bl_sense_amp;
  logic en, top, bot;
  logic x_and, x_nor, x_q, r_and, r_nor, r_q;
  int checks = 0, failures = 0;

  bl_sense_amp #(.XOR_MODE(1'b1)) dut_x (.en, .cell_top(top), .cell_bot(bot),
                                         .sa_and(x_and), .sa_nor(x_nor), .q(x_q));
  bl_sense_amp #(.XOR_MODE(1'b0)) dut_r (.en, .cell_top(top), .cell_bot(1'b0),
                                         .sa_and(r_and), .sa_nor(r_nor), .q(r_q));

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s en=%0d top=%0d bot=%0d got=%0d exp=%0d", what, en, top, bot, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {en, top, bot} = v[2:0];
      #1;
      chk("xor.and", x_and, en & top & bot);
      chk("xor.nor", x_nor, en & ~top & ~bot);
      chk("xor.q",   x_q,   en & (top ^ bot));
      chk("ro.and",  r_and, 1'b0);
      chk("ro.nor",  r_nor, en & ~top);
      chk("ro.q",    r_q,   en & top);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
