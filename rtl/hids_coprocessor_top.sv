// hids_coprocessor_top: the pattern matching co-processor as it sits on the
// FPGA board of a network intrusion detection system.
//
// A network processor deposits packet payloads in two downstream SRAM banks
// and collects match results from an upstream bank; each bank is locked by
// whichever side is using it. This module ties the three FPGA parts of that
// exchange together:
//   sram_packet_reader  locks the downstream banks in turn and streams their
//                       packets into the matcher as 32-bit words
//   hids_matcher_top    searches every packet for all rules at one character
//                       per cycle and emits a result record per packet
//   sram_result_writer  appends each result record to the upstream bank
// Back-pressure runs the whole way: a full upstream bank holds the result
// record, the matcher stalls, its input stops, and the reader pauses its
// bank reads.
//
// The SRAM banks, their lock arbitration and the bus that fills them are
// board parts; their signals are ports here (dn_* for the downstream banks,
// up_* for the upstream bank; see the reader and writer for timing and the
// bank layouts). The four-characters-per-cycle datapath of the matcher is
// brought out unchanged on the w_* ports.
//
// Two baseline matchers stand beside the co-processor with their own ports
// (b_*): a brute-force matcher and a distributed comparator NFA, both for the
// same two strings and one character per clock. They are the designs the
// shared decoder NFA is measured against, and share nothing with it; a
// character on b_ch with b_adv high goes to both, b_sop marks a packet's
// first character, and b_bf_hit / b_cn_hit give each string's hit in the
// same cycle.
module hids_coprocessor_top (
  input  logic              clk,
  input  logic              rst_n,
  // downstream banks (packets in)
  output logic [1:0]        dn_lock_req,
  input  logic [1:0]        dn_lock_gnt,
  output logic [1:0]        dn_cs,
  output logic              dn_we,
  output logic [15:0]       dn_addr,
  output logic [31:0]       dn_wdata,
  input  logic [1:0][31:0]  dn_rdata,
  // upstream bank (results out)
  output logic              up_lock_req,
  input  logic              up_lock_gnt,
  output logic              up_cs,
  output logic              up_we,
  output logic [15:0]       up_addr,
  output logic [31:0]       up_wdata,
  input  logic [31:0]       up_rdata,
  // four-characters-per-cycle datapath
  input  logic [31:0]       w_in_data,
  input  logic              w_in_valid,
  input  logic              w_in_sop,
  input  logic              w_in_eop,
  input  logic [2:0]        w_in_nvalid,
  output logic [3:0]        w_match,
  output logic              w_match_valid,
  // baseline matchers, side by side
  input  logic [7:0]        b_ch,
  input  logic              b_adv,
  input  logic              b_sop,
  output logic [1:0]        b_bf_hit,
  output logic [1:0]        b_cn_hit
);
  logic [31:0] pk_data, res_data;
  logic        pk_valid, pk_ready, pk_last, res_valid, res_ready, res_last;
  logic [1:0]  pk_nbytes;

  sram_packet_reader #(.N_BANKS(2), .AW(16)) u_rd (
    .clk(clk), .rst_n(rst_n),
    .lock_req(dn_lock_req), .lock_gnt(dn_lock_gnt), .bank_cs(dn_cs), .bank_we(dn_we),
    .bank_addr(dn_addr), .bank_wdata(dn_wdata), .bank_rdata(dn_rdata),
    .out_data(pk_data), .out_valid(pk_valid), .out_ready(pk_ready),
    .out_last(pk_last), .out_nbytes(pk_nbytes));

  hids_matcher_top u_match (
    .clk(clk), .rst_n(rst_n),
    .in_data(pk_data), .in_valid(pk_valid), .in_ready(pk_ready),
    .in_last(pk_last), .in_nbytes(pk_nbytes),
    .out_data(res_data), .out_valid(res_valid), .out_ready(res_ready), .out_last(res_last),
    .w_in_data(w_in_data), .w_in_valid(w_in_valid), .w_in_sop(w_in_sop),
    .w_in_eop(w_in_eop), .w_in_nvalid(w_in_nvalid),
    .w_match(w_match), .w_match_valid(w_match_valid));

  sram_result_writer #(.AW(16), .REC_WORDS(2)) u_wr (
    .clk(clk), .rst_n(rst_n),
    .res_data(res_data), .res_valid(res_valid), .res_ready(res_ready), .res_last(res_last),
    .lock_req(up_lock_req), .lock_gnt(up_lock_gnt), .bank_cs(up_cs), .bank_we(up_we),
    .bank_addr(up_addr), .bank_wdata(up_wdata), .bank_rdata(up_rdata));

  brute_force_matcher u_bf (
    .clk(clk), .rst_n(rst_n), .adv(b_adv), .sop(b_sop), .ch(b_ch), .hit(b_bf_hit));

  comparator_nfa u_cn (
    .clk(clk), .rst_n(rst_n), .adv(b_adv), .sop(b_sop), .ch(b_ch), .hit(b_cn_hit));
endmodule
