// crc_exceptions -- the special syndromes of a generator polynomial.
//
// Three syndromes behave unlike the others when the next element is walked:
//   - type I self-loop (g of even parity only): next element is itself, with
//     one XOR of g;  s[n-1] = 0, s[i-1] = g[i+1] ^ s[i] for i = n-1 .. 1.
//   - type II self-loop: next element is itself, with two XORs of g;
//     even g: s[n-1] = 1, s[i-1] = g[i+1] ^ g[i] ^ s[i];  odd g: s = g >> 1.
//   - no single error (even g only): odd weight, yet no single error position
//     gives it; s[n-1] = 1, s[i-1] = g[i] ^ s[i].
// A self-loop syndrome met after forcing errors yields a new candidate at every
// later forced position; the no-single-error syndrome never yields a single
// error.  A receiver can flag these to skip needless work.
//
// Interface: g (with its x^n term) and a syndrome s in; the three special
// syndromes, whether each exists for this g, and whether s equals each, out.
// Purely combinational.  The recurrences are the published ones; the module
// form is this design's.
module crc_exceptions #(
  parameter int unsigned CRC_W = crc_ecot_pkg::CRC_W_DEF
) (
  input  logic [CRC_W:0]   g,
  input  logic [CRC_W-1:0] s,
  output logic [CRC_W-1:0] self1,
  output logic             self1_exists,
  output logic [CRC_W-1:0] self2,
  output logic [CRC_W-1:0] nosingle,
  output logic             nosingle_exists,
  output logic             is_self1,
  output logic             is_self2,
  output logic             is_nosingle
);

  logic g_even;

  always_comb begin
    g_even = ~(^g);
    self1  = '0;
    self2  = '0;
    nosingle = '0;
    self1[CRC_W-1]    = 1'b0;
    self2[CRC_W-1]    = 1'b1;
    nosingle[CRC_W-1] = 1'b1;
    for (int i = int'(CRC_W) - 1; i >= 1; i--) begin
      self1[i-1]    = g[i+1] ^ self1[i];
      self2[i-1]    = g[i+1] ^ g[i] ^ self2[i];
      nosingle[i-1] = g[i] ^ nosingle[i];
    end
    if (!g_even) self2 = g[CRC_W:1];
    self1_exists    = g_even;
    nosingle_exists = g_even;
    is_self1    = g_even && (s == self1);
    is_self2    = (s == self2);
    is_nosingle = g_even && (s == nosingle);
  end

endmodule
