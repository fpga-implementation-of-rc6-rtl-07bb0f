// tb_rc6_core: checks one RC6 round in both directions against the reference
// model, and that a decryption round undoes an encryption round.
module tb_rc6_core;
  import rc6_pkg::*;
  import rc6_ref_pkg::*;

  block_t blk_in, blk_out;
  word_t  s_even, s_odd;
  mode_e  mode;
  int checks = 0, failures = 0;

  rc6_core dut (.blk_in, .s_even, .s_odd, .mode, .blk_out);

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [127:0] v, e, enc_out;
      v = {$urandom, $urandom, $urandom, $urandom};
      if (i == 0) v = '0;
      s_even = $urandom;
      s_odd  = $urandom;
      // encryption round
      blk_in = v; mode = MODE_ENC;
      #1;
      e = round(v, s_even, s_odd, 1'b0);
      enc_out = blk_out;
      checks++;
      if (blk_out !== e) begin
        failures++;
        $display("FAIL enc in=%h out=%h expected=%h", v, blk_out, e);
      end
      // decryption round on random data
      blk_in = v; mode = MODE_DEC;
      #1;
      e = round(v, s_even, s_odd, 1'b1);
      checks++;
      if (blk_out !== e) begin
        failures++;
        $display("FAIL dec in=%h out=%h expected=%h", v, blk_out, e);
      end
      // decryption of the encryption result gives the input back
      blk_in = enc_out; mode = MODE_DEC;
      #1;
      checks++;
      if (blk_out !== v) begin
        failures++;
        $display("FAIL inverse in=%h got=%h", v, blk_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
