// decoder_s23 at W = 8: every payload, sent plain, odd-, even- and
// full-inverted with the two control lines set accordingly, must come back
// unchanged.
module tb_decoder_s23;
  import link_ref_pkg::*;
  logic [8:0] z;
  logic [6:0] p;
  int checks = 0, failures = 0;

  decoder_s23 dut (.z(z), .payload(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++)
      for (int a = 0; a < 4; a++) begin
        z = 9'(apply(lines_t'(v), a, 9));
        #1;
        checks++;
        if (int'(p) != v) begin failures++; $display("FAIL v=%0d a=%0d z=%b p=%b", v, a, z, p); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
