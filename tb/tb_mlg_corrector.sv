// tb_mlg_corrector: for every codeword and every error pattern of weight 0,
// 1 or 2 the corrector must return the original codeword. For random
// three-error words it checks the output against nearest-codeword decoding
// where that is unique within distance 2, and otherwise only counts them.
module tb_mlg_corrector;
  import ldpc_ref_pkg::*;

  logic [14:0] cin, cout;
  int checks = 0, failures = 0;

  mlg_corrector dut (.codeword_in(cin), .codeword_out(cout));

  task automatic check(input bit ok, input string what, input logic [14:0] exp);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s in=%b out=%b exp=%b", what, cin, cout, exp);
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
      cin = c;
      #1;
      check(cout == c, "no error", c);
      for (int a = 0; a < 15; a++) begin
        cin = c ^ (15'(1) << a);
        #1;
        check(cout == c, "single error", c);
        for (int b = a + 1; b < 15; b++) begin
          cin = c ^ (15'(1) << a) ^ (15'(1) << b);
          #1;
          check(cout == c, "double error", c);
        end
      end
    end
    // random words within distance 2 of a codeword
    for (int i = 0; i < 3000; i++) begin
      logic [14:0] d;
      cin = 15'($urandom);
      #1;
      d = ref_decode(cin);
      if ($countones(d ^ cin) <= 2) check(cout == d, "random decodable word", d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
