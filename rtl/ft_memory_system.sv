// ft_memory_system: fault-tolerant memory built around the (15,7,5)
// EG-LDPC code, tolerating transient faults in the stored words and in the
// encoder and corrector that surround them.
//
// Data path: a write's 7 information bits go through the encoder; the
// encoder's fault-secure detector checks the 15-bit codeword and only a
// valid codeword is stored, otherwise the encoding is repeated. A read's
// stored codeword goes through the majority-logic corrector; the
// corrector's fault-secure detector checks the result and the correction is
// repeated on a detected fault. The data bits are the first 7 codeword bits
// (systematic code), so no decoding step is needed. A periodic scrub reads,
// corrects and writes back every word so that upsets do not pile up beyond
// the two the code corrects.
//
// Interface: see ft_mem_ctrl for the request/response handshake and timing.
// The inputs enc_fault_mask, cor_fault_mask and upset_* inject transient
// faults (XORed onto the encoder output, onto the corrector output, and into
// a stored word) and belong to this design, not to the document; tie them to
// zero in use. Parameters: DEPTH words, MAX_RETRY repeats per operation,
// SCRUB_PERIOD cycles between scrubs, all three this design's choice.
module ft_memory_system
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned DEPTH        = 1024,
  parameter int unsigned MAX_RETRY    = 3,
  parameter int unsigned SCRUB_PERIOD = 65536,
  localparam int unsigned AW          = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_write,
  input  logic [AW-1:0] req_addr,
  input  info_t         req_wdata,
  output logic          rsp_valid,
  output info_t         rsp_rdata,
  output logic          rsp_error,
  // fault injection
  input  codeword_t     enc_fault_mask,
  input  codeword_t     cor_fault_mask,
  input  logic          upset_en,
  input  logic [AW-1:0] upset_addr,
  input  codeword_t     upset_mask,
  // status
  output logic          enc_retry,
  output logic          cor_retry,
  output logic          cor_fixed,
  output logic          scrub_active,
  output logic          scrub_fail,
  output syndrome_t     enc_syndrome,
  output syndrome_t     cor_syndrome
);

  info_t         enc_info;
  codeword_t     enc_raw, enc_cw, cor_raw, cor_cw, mem_rdata, mem_wdata;
  logic          enc_error, cor_error, mem_en, mem_we;
  logic [AW-1:0] mem_addr;

  // encoder and its detector
  eg_ldpc_encoder u_encoder (.info(enc_info), .codeword(enc_raw));
  assign enc_cw = enc_raw ^ enc_fault_mask;
  fs_detector u_enc_detector (.codeword(enc_cw), .syndrome(enc_syndrome), .error(enc_error));

  // storage
  codeword_memory #(.DEPTH(DEPTH), .WIDTH(N)) u_memory (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rdata(mem_rdata), .upset_en, .upset_addr, .upset_mask
  );

  // corrector and its detector
  mlg_corrector u_corrector (.codeword_in(mem_rdata), .codeword_out(cor_raw));
  assign cor_cw = cor_raw ^ cor_fault_mask;
  fs_detector u_cor_detector (.codeword(cor_cw), .syndrome(cor_syndrome), .error(cor_error));

  ft_mem_ctrl #(.DEPTH(DEPTH), .MAX_RETRY(MAX_RETRY), .SCRUB_PERIOD(SCRUB_PERIOD)) u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_write, .req_addr, .req_wdata,
    .rsp_valid, .rsp_rdata, .rsp_error,
    .enc_info, .enc_codeword(enc_cw), .enc_error,
    .mem_rdata, .cor_codeword(cor_cw), .cor_error,
    .mem_en, .mem_we, .mem_addr, .mem_wdata,
    .enc_retry, .cor_retry, .cor_fixed, .scrub_active, .scrub_fail
  );

endmodule
