// tb_ft_mem_ctrl: exercises the retry/scrub controller on its own. The
// encoder, corrector, detectors and memory around it are reference models
// in this testbench (nearest-codeword decoding stands in for the
// corrector). Checked: write and read latency without faults (1 and 2
// cycles), one extra cycle per retry after a transient fault in the encoder
// or the corrector, rsp_error and no store after MAX_RETRY failed repeats,
// and a scrub pass that stops requests and repairs every upset word.
module tb_ft_mem_ctrl;
  import ldpc_ref_pkg::*;

  localparam int DEPTH = 16;
  localparam int AW = $clog2(DEPTH);
  localparam int MAX_RETRY = 2;
  localparam int SCRUB_PERIOD = 600;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_write = 0;
  logic [AW-1:0] req_addr = '0;
  logic [6:0] req_wdata = '0, rsp_rdata, enc_info;
  logic rsp_valid, rsp_error;
  logic [14:0] enc_codeword, mem_rdata, cor_codeword, mem_wdata;
  logic enc_error, cor_error, mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic enc_retry, cor_retry, cor_fixed, scrub_active, scrub_fail;

  // fault injection state
  int enc_left = 0, cor_left = 0;
  logic [14:0] enc_mask = 15'h0001, cor_mask = 15'h0100;
  logic upset_go = 0;
  logic [AW-1:0] upset_a = '0;
  logic [14:0] upset_m = '0;

  // models around the controller
  logic [14:0] mem [DEPTH];
  assign enc_codeword = ref_encode(enc_info) ^ (enc_left > 0 ? enc_mask : '0);
  assign enc_error    = ref_syndrome(enc_codeword) != '0;
  assign cor_codeword = ref_decode(mem_rdata) ^ (cor_left > 0 ? cor_mask : '0);
  assign cor_error    = ref_syndrome(cor_codeword) != '0;

  always @(posedge clk) begin
    if (mem_en && mem_we) mem[mem_addr] <= mem_wdata;
    if (mem_en && !mem_we) mem_rdata <= mem[mem_addr];
    if (upset_go) mem[upset_a] <= mem[upset_a] ^ upset_m;
    if (enc_left > 0 && (enc_retry || rsp_valid)) enc_left <= enc_left - 1;
    if (cor_left > 0 && (cor_retry || rsp_valid)) cor_left <= cor_left - 1;
  end

  ft_mem_ctrl #(.DEPTH(DEPTH), .MAX_RETRY(MAX_RETRY), .SCRUB_PERIOD(SCRUB_PERIOD)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_enc_retry = 0, n_cor_retry = 0, n_scrub_cycles = 0, n_fixed = 0;
  logic [6:0] shadow [DEPTH];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      if (enc_retry) n_enc_retry++;
      if (cor_retry) n_cor_retry++;
      if (scrub_active) n_scrub_cycles++;
      if (cor_fixed && scrub_active) n_fixed++;
      if (scrub_active) begin
        checks++;
        if (req_ready || rsp_valid) begin
          failures++;
          $display("FAIL request path active during scrub");
        end
      end
    end
  end

  // one request; returns read data, error flag and latency in cycles
  task automatic do_req(input bit w, input int a, input logic [6:0] d,
                        output logic [6:0] rd, output bit er, output int lat);
    @(negedge clk);
    req_valid = 1; req_write = w; req_addr = AW'(a); req_wdata = d;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!rsp_valid) begin
      @(negedge clk);
      lat++;
      if (lat > 50) break;
    end
    rd = rsp_rdata;
    er = rsp_error;
    @(negedge clk);  // let a write reach the memory
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] rd;
    bit er;
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // fill memory, no faults: write latency 1
    for (int a = 0; a < DEPTH; a++) begin
      shadow[a] = 7'($urandom);
      do_req(1, a, shadow[a], rd, er, lat);
      check(!er && lat == 1, "write latency/error");
      check(mem[a] == ref_encode(shadow[a]), "stored codeword");
    end
    // reads: latency 2
    for (int a = 0; a < DEPTH; a++) begin
      do_req(0, a, '0, rd, er, lat);
      check(!er && lat == 2 && rd == shadow[a], "read");
    end
    // transient encoder fault for one evaluation: one retry
    enc_left = 1;
    shadow[3] = 7'h55;
    do_req(1, 3, shadow[3], rd, er, lat);
    check(!er && lat == 2, "write with one encoder retry");
    check(mem[3] == ref_encode(shadow[3]), "stored after retry");
    // persistent encoder fault: MAX_RETRY repeats then error, nothing stored
    enc_left = MAX_RETRY + 1;
    do_req(1, 3, 7'h2a, rd, er, lat);
    check(er && lat == MAX_RETRY + 1, "write gives up");
    check(mem[3] == ref_encode(shadow[3]), "no store on failed write");
    // transient corrector fault: one retry
    cor_left = 1;
    do_req(0, 3, '0, rd, er, lat);
    check(!er && lat == 3 && rd == shadow[3], "read with one corrector retry");
    // persistent corrector fault
    cor_left = MAX_RETRY + 1;
    do_req(0, 4, '0, rd, er, lat);
    check(er && lat == MAX_RETRY + 2, "read gives up");
    // upset words, then wait for a scrub
    @(negedge clk);
    for (int a = 0; a < DEPTH; a += 2) begin
      upset_go = 1; upset_a = AW'(a); upset_m = 15'(1) << (a % 15);
      @(negedge clk);
    end
    upset_go = 0;
    // a read with a single upset is corrected on the fly
    do_req(0, 2, '0, rd, er, lat);
    check(!er && rd == shadow[2], "read corrects upset");
    while (!scrub_active) @(negedge clk);
    while (scrub_active) @(negedge clk);
    for (int a = 0; a < DEPTH; a++)
      check(mem[a] == ref_encode(shadow[a]), "scrubbed word");
    check(n_fixed == DEPTH / 2, "scrub corrections");
    check(n_scrub_cycles == 2 * DEPTH, "scrub length");
    check(n_enc_retry == 1 + MAX_RETRY, "encoder retries");
    check(n_cor_retry == 1 + MAX_RETRY, "corrector retries");
    $display("enc_retry=%0d cor_retry=%0d scrub_cycles=%0d scrub_fixed=%0d",
             n_enc_retry, n_cor_retry, n_scrub_cycles, n_fixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
