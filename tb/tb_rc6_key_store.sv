// tb_rc6_key_store: fills the round-key array through the word port with
// random words and reads every word back through both ports.
module tb_rc6_key_store;
  import rc6_pkg::*;

  localparam int R = 20;
  logic       clk = 0;
  logic [5:0] ks_addr;
  logic       ks_we;
  word_t      ks_wdata, ks_rdata, s_even, s_odd;
  logic [4:0] pair_addr;
  word_t      model [2*R+4];
  int checks = 0, failures = 0;

  rc6_key_store #(.ROUNDS(R)) dut (.clk, .ks_addr, .ks_we, .ks_wdata, .ks_rdata,
                                   .pair_addr, .s_even, .s_odd);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ks_we = 0; ks_addr = 0; ks_wdata = 0; pair_addr = 0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < 2*R+4; i++) begin
        @(negedge clk);
        ks_addr = 6'(i); ks_we = 1; ks_wdata = $urandom; model[i] = ks_wdata;
      end
      @(negedge clk);
      ks_we = 0;
      for (int i = 0; i < 2*R+4; i++) begin
        ks_addr = 6'(i);
        #1;
        checks++;
        if (ks_rdata !== model[i]) begin
          failures++;
          $display("FAIL word %0d got %h expected %h", i, ks_rdata, model[i]);
        end
      end
      for (int k = 0; k < R+2; k++) begin
        pair_addr = 5'(k);
        #1;
        checks++;
        if (s_even !== model[2*k] || s_odd !== model[2*k+1]) begin
          failures++;
          $display("FAIL pair %0d got %h %h expected %h %h", k, s_even, s_odd, model[2*k], model[2*k+1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
