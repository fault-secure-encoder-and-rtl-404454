// tb_codeword_memory: random reads, writes and upsets against a shadow
// array; checks read data one cycle after each read, that rdata holds while
// no read is issued, and that an upset flips exactly the masked bits.
module tb_codeword_memory;
  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, en, we, upset_en;
  logic [AW-1:0] addr, upset_addr;
  logic [14:0] wdata, rdata, upset_mask;
  logic [14:0] shadow [DEPTH];
  logic [14:0] expect_q;
  bit   pending;
  int checks = 0, failures = 0;

  codeword_memory #(.DEPTH(DEPTH), .WIDTH(15)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; upset_en = 0; addr = '0; upset_addr = '0; wdata = '0; upset_mask = '0;
    pending = 0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = AW'(a); wdata = 15'($urandom);
      shadow[a] = wdata;
    end
    @(negedge clk);
    en = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          if (failures < 10) $display("FAIL read data %h expected %h", rdata, expect_q);
        end
      end
      pending = 0;
      en = $urandom_range(0, 3) != 0;
      we = $urandom_range(0, 1) == 1;
      addr = AW'($urandom);
      wdata = 15'($urandom);
      upset_en = $urandom_range(0, 3) == 0;
      upset_addr = AW'($urandom);
      upset_mask = 15'($urandom);
      if (en && !we) begin
        pending  = 1;
        expect_q = shadow[addr];
      end
      if (!(en && !we)) begin
        // rdata must hold: keep comparing to the previous value
        expect_q = rdata;
        pending  = 1;
      end
      if (upset_en) shadow[upset_addr] = shadow[upset_addr] ^ upset_mask;
      if (en && we) shadow[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
