// tb_ft_memory_system: end-to-end test of the fault-tolerant memory at its
// default parameters (1024 words, 3 retries, scrub every 65536 cycles).
//
// It fills the memory, then issues random reads and writes while injecting
// transient faults: one-cycle errors on the encoder output (must cause one
// encoder retry), one-cycle errors on the corrector output (one corrector
// retry), persistent errors on either (rsp_error after MAX_RETRY repeats),
// and single or double bit upsets in stored words, never more than two per
// word between writes and scrubs. Every read must return the last data
// written, and every latency must be 1 (write) or 2 (read) plus the
// retries. The run lasts until two scrub passes have completed; afterwards
// a read of every word must need no correction. Each mechanism must occur
// at least once.
module tb_ft_memory_system;
  import ldpc_ref_pkg::*;

  localparam int DEPTH = 1024;
  localparam int AW = $clog2(DEPTH);
  localparam int MAX_RETRY = 3;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_write = 0;
  logic [AW-1:0] req_addr = '0;
  logic [6:0] req_wdata = '0, rsp_rdata;
  logic rsp_valid, rsp_error;
  logic [14:0] enc_fault_mask, cor_fault_mask;
  logic upset_en = 0;
  logic [AW-1:0] upset_addr = '0;
  logic [14:0] upset_mask = '0;
  logic enc_retry, cor_retry, cor_fixed, scrub_active, scrub_fail;
  logic [14:0] enc_syndrome, cor_syndrome;

  ft_memory_system dut (.*);

  always #5 clk = ~clk;

  // transient faults: active for the next N evaluations of the unit
  int enc_left = 0, cor_left = 0;
  logic [14:0] enc_m = '0, cor_m = '0;
  assign enc_fault_mask = (enc_left > 0 && !scrub_active) ? enc_m : '0;
  assign cor_fault_mask = (cor_left > 0 && !scrub_active) ? cor_m : '0;
  always @(posedge clk) begin
    if (enc_left > 0 && (enc_retry || rsp_valid)) enc_left <= enc_left - 1;
    if (cor_left > 0 && !scrub_active && (cor_retry || (rsp_valid && !req_write_q))) cor_left <= cor_left - 1;
  end
  logic req_write_q;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_enc_retry = 0, n_cor_retry = 0, n_read_fix = 0, n_scrub_fix = 0;
  int n_scrub_pass = 0, n_wr_giveup = 0, n_rd_giveup = 0, n_stall = 0;
  int n_upset = 0, n_double = 0, n_scrub_fail = 0;
  bit scrub_q = 0;

  logic [6:0] shadow [DEPTH];
  int         nerr   [DEPTH];

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
      if (cor_fixed && !scrub_active) n_read_fix++;
      if (cor_fixed && scrub_active) n_scrub_fix++;
      if (scrub_fail) n_scrub_fail++;
      if (req_valid && !req_ready && scrub_active) n_stall++;
      if (scrub_q && !scrub_active) begin
        n_scrub_pass++;
        for (int a = 0; a < DEPTH; a++) nerr[a] = 0;
      end
      scrub_q = scrub_active;
    end
  end

  task automatic do_req(input bit w, input int a, input logic [6:0] d,
                        output logic [6:0] rd, output bit er, output int lat);
    @(negedge clk);
    req_valid = 1; req_write = w; req_write_q = w; req_addr = AW'(a); req_wdata = d;
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
    @(negedge clk);  // the response cycle ends before the next request
  endtask

  task automatic upset(input int a, input logic [14:0] m);
    @(negedge clk);
    upset_en = 1; upset_addr = AW'(a); upset_mask = m;
    @(negedge clk);
    upset_en = 0;
  endtask

  function automatic logic [14:0] onebit();
    return 15'(1) << $urandom_range(0, 14);
  endfunction

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] rd;
    bit er;
    int lat, a, kind, exp_lat;
    bit exp_err;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int i = 0; i < DEPTH; i++) begin
      shadow[i] = 7'($urandom);
      nerr[i] = 0;
      do_req(1, i, shadow[i], rd, er, lat);
      check(!er && lat == 1, "fill write");
    end

    while (n_scrub_pass < 2) begin
      a = $urandom_range(0, DEPTH - 1);
      kind = $urandom_range(0, 99);
      // storage upsets between requests
      if (kind < 15 && !scrub_active) begin
        int b;
        b = $urandom_range(0, DEPTH - 1);
        if (nerr[b] == 0 && kind < 3) begin
          logic [14:0] m1, m2;
          m1 = onebit();
          do m2 = onebit(); while (m2 == m1);
          upset(b, m1 | m2);
          nerr[b] = 2;
          n_double++;
          n_upset++;
        end else if (nerr[b] < 2) begin
          upset(b, onebit());
          nerr[b]++;
          n_upset++;
        end
        continue;
      end
      exp_lat = 0;
      exp_err = 0;
      if (kind < 55) begin
        // write
        logic [6:0] d;
        d = 7'($urandom);
        if (kind < 20) begin
          enc_left = 1; enc_m = onebit(); exp_lat = 1;
        end else if (kind < 21) begin
          enc_left = MAX_RETRY + 1; enc_m = onebit(); exp_lat = MAX_RETRY; exp_err = 1;
        end
        do_req(1, a, d, rd, er, lat);
        check(er == exp_err && lat == 1 + exp_lat, $sformatf("write response er=%0d lat=%0d exp %0d/%0d", er, lat, exp_err, 1 + exp_lat));
        if (er) n_wr_giveup++;
        else begin
          shadow[a] = d;
          nerr[a] = 0;
        end
      end else begin
        // read
        if (kind < 65) begin
          cor_left = 1; cor_m = onebit(); exp_lat = 1;
        end else if (kind < 66) begin
          cor_left = MAX_RETRY + 1; cor_m = onebit(); exp_lat = MAX_RETRY; exp_err = 1;
        end
        do_req(0, a, '0, rd, er, lat);
        check(er == exp_err && lat == 2 + exp_lat, $sformatf("read response er=%0d lat=%0d exp %0d/%0d", er, lat, exp_err, 2 + exp_lat));
        if (er) n_rd_giveup++;
        else check(rd == shadow[a], "read data");
      end
      enc_left = 0;
      cor_left = 0;
    end

    // after the last scrub every word is clean
    for (int i = 0; i < DEPTH; i++) begin
      int f0;
      f0 = n_read_fix;
      do_req(0, i, '0, rd, er, lat);
      check(!er && rd == shadow[i] && lat == 2, "final read");
    end

    $display("enc_retry=%0d cor_retry=%0d read_fix=%0d scrub_fix=%0d scrub_pass=%0d",
             n_enc_retry, n_cor_retry, n_read_fix, n_scrub_fix, n_scrub_pass);
    $display("write_giveup=%0d read_giveup=%0d stall=%0d upsets=%0d double_upsets=%0d scrub_fail=%0d",
             n_wr_giveup, n_rd_giveup, n_stall, n_upset, n_double, n_scrub_fail);
    check(n_enc_retry > 0, "encoder retry happened");
    check(n_cor_retry > 0, "corrector retry happened");
    check(n_read_fix > 0, "read correction happened");
    check(n_scrub_fix > 0, "scrub correction happened");
    check(n_scrub_pass >= 2, "scrub passes");
    check(n_wr_giveup > 0, "write give-up happened");
    check(n_rd_giveup > 0, "read give-up happened");
    check(n_stall > 0, "request stalled by scrub");
    check(n_double > 0, "double upset happened");
    check(n_scrub_fail == 0, "no scrub failure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
