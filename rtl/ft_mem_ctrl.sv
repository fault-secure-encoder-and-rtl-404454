// ft_mem_ctrl: sequencing of the fault-tolerant memory system: encode with
// retry on writes, correct with retry on reads, and periodic scrubbing.
//
// The encoder and the corrector are checked by their own fault-secure
// detectors. A detected error in either is treated as a transient fault in
// that unit: the unit repeats its operation (is evaluated again on the same
// input in the next cycle) until its detector sees a valid codeword. After
// MAX_RETRY repeats that still fail, the operation is abandoned and reported
// with rsp_error (a write is then not stored; a read returns the data bits
// of the last corrector output). Retry counts are not given by the document.
//
// Scrubbing: a free-running counter raises a scrub request every
// SCRUB_PERIOD cycles. Normal access stops once the current request is done:
// every word is read, corrected, checked (with retry) and written back, one
// word every two cycles plus retries, before requests are taken again. A
// word whose corrector output never passes the check is left untouched and
// scrub_fail pulses.
//
// Request interface: req_valid/req_ready handshake; req_write selects a write
// of req_wdata to req_addr or a read of req_addr. Exactly one rsp_valid pulse
// answers each accepted request, carrying rsp_rdata for reads and rsp_error.
// Timing without faults: a write answers 1 cycle after acceptance, a read 2
// cycles after acceptance; each retry adds 1 cycle.
//
// Status pulses for monitoring: enc_retry / cor_retry (a repeat was
// started), cor_fixed (the corrector changed a word it accepted),
// scrub_active (level, scrubbing in progress).
module ft_mem_ctrl
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned DEPTH        = 1024,
  parameter int unsigned MAX_RETRY    = 3,
  parameter int unsigned SCRUB_PERIOD = 65536,
  localparam int unsigned AW          = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  // request / response
  input  logic            req_valid,
  output logic            req_ready,
  input  logic            req_write,
  input  logic [AW-1:0]   req_addr,
  input  info_t           req_wdata,
  output logic            rsp_valid,
  output info_t           rsp_rdata,
  output logic            rsp_error,
  // encoder side
  output info_t           enc_info,
  input  codeword_t       enc_codeword,
  input  logic            enc_error,
  // corrector side (its input is mem_rdata)
  input  codeword_t       mem_rdata,
  input  codeword_t       cor_codeword,
  input  logic            cor_error,
  // memory port
  output logic            mem_en,
  output logic            mem_we,
  output logic [AW-1:0]   mem_addr,
  output codeword_t       mem_wdata,
  // status
  output logic            enc_retry,
  output logic            cor_retry,
  output logic            cor_fixed,
  output logic            scrub_active,
  output logic            scrub_fail
);

  typedef enum logic [2:0] {
    S_IDLE,       // waiting for a request or a scrub
    S_ENCODE,     // encoder output checked; store or repeat
    S_READ,       // memory read in flight
    S_CORRECT,    // corrector output checked; answer or repeat
    S_SCRUB_RD,   // scrub: memory read in flight
    S_SCRUB_COR   // scrub: corrector output checked; write back or repeat
  } state_e;

  localparam int unsigned RW = $clog2(MAX_RETRY + 1) > 0 ? $clog2(MAX_RETRY + 1) : 1;
  localparam int unsigned PW = $clog2(SCRUB_PERIOD) > 0 ? $clog2(SCRUB_PERIOD) : 1;

  state_e          state;
  logic [AW-1:0]   addr_q;
  info_t           data_q;
  logic [RW-1:0]   tries_q;
  logic [PW-1:0]   period_q;
  logic            scrub_pend_q;

  wire retries_left = (tries_q != RW'(MAX_RETRY));
  wire last_addr    = (addr_q == AW'(DEPTH - 1));

  // scrub timer
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      period_q     <= '0;
      scrub_pend_q <= 1'b0;
    end else begin
      if (period_q == PW'(SCRUB_PERIOD - 1)) begin
        period_q     <= '0;
        scrub_pend_q <= 1'b1;
      end else begin
        period_q <= period_q + 1'b1;
      end
      if (state == S_IDLE && scrub_pend_q) scrub_pend_q <= 1'b0;
    end
  end

  assign req_ready = (state == S_IDLE) && !scrub_pend_q;

  // state machine
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      addr_q  <= '0;
      data_q  <= '0;
      tries_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          tries_q <= '0;
          if (scrub_pend_q) begin
            addr_q <= '0;
            state  <= S_SCRUB_RD;
          end else if (req_valid) begin
            addr_q <= req_addr;
            data_q <= req_wdata;
            state  <= req_write ? S_ENCODE : S_READ;
          end
        end
        S_ENCODE: begin
          if (enc_error && retries_left) tries_q <= tries_q + 1'b1;
          else                           state   <= S_IDLE;
        end
        S_READ: state <= S_CORRECT;
        S_CORRECT: begin
          if (cor_error && retries_left) tries_q <= tries_q + 1'b1;
          else                           state   <= S_IDLE;
        end
        S_SCRUB_RD: state <= S_SCRUB_COR;
        S_SCRUB_COR: begin
          if (cor_error && retries_left) begin
            tries_q <= tries_q + 1'b1;
          end else begin
            tries_q <= '0;
            addr_q  <= addr_q + 1'b1;
            state   <= last_addr ? S_IDLE : S_SCRUB_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign enc_info = data_q;

  // memory port
  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = addr_q;
    mem_wdata = enc_codeword;
    unique case (state)
      S_ENCODE: begin
        mem_en = !enc_error;
        mem_we = 1'b1;
      end
      S_READ, S_SCRUB_RD: mem_en = 1'b1;
      S_SCRUB_COR: begin
        mem_en    = !cor_error;
        mem_we    = 1'b1;
        mem_wdata = cor_codeword;
      end
      default: ;
    endcase
  end

  // responses and status
  wire enc_done = (state == S_ENCODE)  && !(enc_error && retries_left);
  wire rd_done  = (state == S_CORRECT) && !(cor_error && retries_left);

  assign rsp_valid    = enc_done || rd_done;
  assign rsp_error    = (enc_done && enc_error) || (rd_done && cor_error);
  assign rsp_rdata    = rd_done ? cor_codeword[K-1:0] : '0;
  assign enc_retry    = (state == S_ENCODE) && enc_error && retries_left;
  assign cor_retry    = (state == S_CORRECT || state == S_SCRUB_COR) && cor_error && retries_left;
  assign cor_fixed    = (state == S_CORRECT || state == S_SCRUB_COR) && !cor_error
                        && (cor_codeword != mem_rdata);
  assign scrub_active = (state == S_SCRUB_RD) || (state == S_SCRUB_COR);
  assign scrub_fail   = (state == S_SCRUB_COR) && cor_error && !retries_left;

  // handshake rules
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
                             rsp_valid |-> !scrub_active);
  a_no_write_bad: assert property (@(posedge clk) disable iff (!rst_n)
                                   (mem_en && mem_we) |-> !(enc_error && state == S_ENCODE));
  a_ready_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 req_ready |-> state == S_IDLE);

endmodule
