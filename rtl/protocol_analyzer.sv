// protocol_analyzer: request-line decoding for ASCII protocols such as HTTP.
//
// A request line is "<method> <argument> <version>". One string NFA per
// method looks for the method names anywhere in the stream; their outputs are
// ORed. A method followed by one or more whitespace characters opens the
// argument: from its first non-whitespace character `en_args` is high and the
// argument pattern matchers (uricontent) are enabled, until the next
// whitespace character closes the argument. A character counter measures the
// argument and raises `overflow` when it is longer than MAX_ARG characters,
// which flags a likely buffer overflow attempt.
//
// States: IDLE (no method seen), CMD (method just matched), WS (inside the
// whitespace after the method), ARG (inside the argument). Everything restarts
// at the first character of a packet. `en_args`, `arg_hit` and `overflow`
// refer to the current character (combinational from `dec`).
module protocol_analyzer
  import hids_pkg::*;
#(
  parameter int unsigned N_CMD   = 3,
  parameter pat_t        CMD_PAT [N_CMD] = '{"GET", "POST", "HEAD"},
  parameter int unsigned CMD_LEN [N_CMD] = '{3, 4, 4},
  parameter int unsigned N_ARG   = 1,
  parameter pat_t        ARG_PAT [N_ARG] = '{"/bin/sh"},
  parameter int unsigned ARG_LEN [N_ARG] = '{7},
  parameter bit          ARG_NOCASE = 1'b0,
  parameter int unsigned MAX_ARG = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             adv,
  input  logic             sop,
  input  char_t            ch,        // current character (for whitespace)
  input  dec_t             dec,
  output logic             cmd_hit,   // a method name ends here
  output logic             en_args,   // current character is in the argument
  output logic [N_ARG-1:0] arg_hit,   // an argument pattern ends here
  output logic             overflow
);
  typedef enum logic [1:0] {IDLE, CMD, WS, ARG} pstate_e;

  pstate_e         state, cur, nxt;
  logic [N_CMD-1:0] m_cmd;
  logic             ws;

  for (genvar c = 0; c < N_CMD; c++) begin : g_cmd
    string_nfa #(.LEN(CMD_LEN[c]), .PAT(CMD_PAT[c])) u_cmd (
      .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .en_in(1'b1),
      .dec(dec), .hit(m_cmd[c]));
  end
  assign cmd_hit = |m_cmd;
  assign ws      = is_ws(ch);
  assign cur     = sop ? IDLE : state;

  always_comb begin
    en_args = 1'b0;
    nxt     = cur;
    unique case (cur)
      IDLE: nxt = IDLE;
      CMD:  nxt = ws ? WS : IDLE;
      WS:   if (!ws) begin nxt = ARG; en_args = 1'b1; end
      ARG:  if (ws) nxt = IDLE; else en_args = 1'b1;
    endcase
    if (cmd_hit) nxt = CMD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   state <= IDLE;
    else if (adv) state <= nxt;
  end

  for (genvar a = 0; a < N_ARG; a++) begin : g_arg
    logic h;
    string_nfa #(.LEN(ARG_LEN[a]), .PAT(ARG_PAT[a]), .NOCASE(ARG_NOCASE)) u_arg (
      .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .en_in(en_args),
      .dec(dec), .hit(h));
    assign arg_hit[a] = h & en_args;
  end

  char_counter #(.MAX_ARG(MAX_ARG)) u_cnt (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .en(en_args),
    .overflow(overflow));
endmodule
