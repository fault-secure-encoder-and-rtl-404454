// tb_fs_detector: checks the syndrome of the detector against the reference
// H for every codeword, and that every codeword plus every error pattern of
// weight 1 to 4 (d_min - 1) raises error while error-free codewords do not.
// Also checks the syndrome of random 15-bit words.
module tb_fs_detector;
  import ldpc_ref_pkg::*;

  logic [14:0] cw, syn;
  logic        err;
  int checks = 0, failures = 0;

  fs_detector dut (.codeword(cw), .syndrome(syn), .error(err));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s cw=%b syn=%b err=%b", what, cw, syn, err);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 128; m++) begin
      logic [14:0] c;
      c = ref_encode(7'(m));
      cw = c;
      #1;
      check(!err && syn == '0, "valid codeword");
      for (int e = 1; e < (1 << 15); e++) begin
        if ($countones(e) <= 4) begin
          cw = c ^ 15'(e);
          #1;
          check(err, "error pattern not detected");
          check(syn == ref_syndrome(cw), "syndrome");
        end
      end
    end
    for (int i = 0; i < 2000; i++) begin
      cw = 15'($urandom);
      #1;
      check(syn == ref_syndrome(cw), "random syndrome");
      check(err == (syn != '0), "error flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
