// tb_residue_mux: all input combinations. SRC_MUT must give 2*D_MUT - 1,
// SRC_DIFF must give D_MUT - D_REF.
module tb_residue_mux;
  import bist_pkg::*;
  dec_src_e sel;
  logic d_mut, d_ref;
  logic signed [1:0] dout;
  int checks = 0, failures = 0, expv;

  residue_mux dut (.sel, .d_mut, .d_ref, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      sel   = dec_src_e'(i[2]);
      d_mut = i[1];
      d_ref = i[0];
      #1;
      expv = (sel == SRC_DIFF) ? (int'(d_mut) - int'(d_ref)) : (d_mut ? 1 : -1);
      checks++;
      if (int'(dout) != expv) begin
        failures++;
        $display("sel %0d mut %0b ref %0b: got %0d expected %0d", sel, d_mut, d_ref, dout, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
