// nocase_select: picks the shared-decoder match line for one pattern character.
//
// With the shared decoder every character code has its own line, so a
// character match unit needs only one bit. For a case-insensitive pattern
// character that is a letter, the lines of its lower- and upper-case codes
// (which differ only in bit 5) are ORed, so one match unit serves both cases.
// Purely combinational; CH and NOCASE are fixed when the circuit is built.
// The default is the case-insensitive form, the one that holds logic; with
// NOCASE=0 the module reduces to a single decoder line.
module nocase_select
  import hids_pkg::*;
#(
  parameter char_t CH     = 8'h61,
  parameter bit    NOCASE = 1'b1
) (
  input  dec_t dec,   // decoder lines for the current character
  output logic m      // current character matches CH
);
  localparam bit    BOTH  = NOCASE && is_alpha(CH);
  localparam char_t OTHER = CH ^ 8'h20;

  if (BOTH) begin : g_both
    assign m = dec[CH] | dec[OTHER];
  end else begin : g_one
    assign m = dec[CH];
  end
endmodule
