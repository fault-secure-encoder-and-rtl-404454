// tb_eg_ldpc_encoder: applies all 128 information vectors to the encoder
// and compares each codeword with the parity equations of the reference
// model; also checks the worked example 000_0010 -> parity 0111_0100
// (p0..p7) and that every codeword has a zero reference syndrome.
module tb_eg_ldpc_encoder;
  import ldpc_ref_pkg::*;

  logic [6:0]  info;
  logic [14:0] codeword;
  int checks = 0, failures = 0;

  eg_ldpc_encoder dut (.info(info), .codeword(codeword));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s info=%b cw=%b", what, info, codeword);
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
    for (int m = 0; m < 128; m++) begin
      info = 7'(m);
      #1;
      check(codeword == ref_encode(info), "codeword");
      check(ref_syndrome(codeword) == '0, "syndrome");
    end
    info = 7'b000_0010;
    #1;
    // p0..p7 = 0,1,1,1,0,1,0,0
    check(codeword[14:7] == 8'b0010_1110, "worked example parity");
    check(codeword[6:0] == 7'b000_0010, "worked example info");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
