// lpbist_pkg: types and helper functions shared by the low-power test-per-scan
// BIST blocks.
//
// - fl_gate_e names the logic function of a first-level gate of the circuit
//   under test; gating_e says which supply rail of that gate is switched off
//   during scan shift (GND-gated gates are pulled to 1, VDD-gated gates are
//   pulled to 0, as in the two supply-gating styles of the design).
// - part_len/part_off split N items (scan flip-flops or primary inputs) into K
//   contiguous partitions of nearly equal size: the first N%K partitions get
//   one extra item. The split itself is this design's choice; which physical
//   flip-flop goes to which index is decided offline by the partitioning
//   heuristic and applied by ordering the signals at the top-level ports.
// - The LFSR/MISR default polynomial x^32+x^22+x^2+x+1 is this design's choice.
package lpbist_pkg;

  typedef enum logic [2:0] {
    G_AND  = 3'd0,
    G_OR   = 3'd1,
    G_NAND = 3'd2,
    G_NOR  = 3'd3,
    G_BUF  = 3'd4,
    G_INV  = 3'd5
  } fl_gate_e;

  typedef enum logic {
    GATE_GND = 1'b0,  // footer NMOS switched off, output pulled up to 1
    GATE_VDD = 1'b1   // header PMOS switched off, output pulled down to 0
  } gating_e;

  // Maximal-length polynomial x^32+x^22+x^2+x+1 as a Fibonacci tap mask
  // (bit i set = stage i feeds the XOR).
  localparam logic [31:0] POLY32 = 32'h8020_0003;

  // Number of items in partition p when n items are split into k partitions.
  function automatic int unsigned part_len(int unsigned n, int unsigned k, int unsigned p);
    return n / k + ((p < (n % k)) ? 1 : 0);
  endfunction

  // Index of the first item of partition p.
  function automatic int unsigned part_off(int unsigned n, int unsigned k, int unsigned p);
    int unsigned off;
    off = 0;
    for (int unsigned i = 0; i < p; i++) off += part_len(n, k, i);
    return off;
  endfunction

  // Partition that item i belongs to.
  function automatic int unsigned part_of(int unsigned n, int unsigned k, int unsigned i);
    int unsigned p;
    p = 0;
    for (int unsigned j = 1; j < k; j++)
      if (i >= part_off(n, k, j)) p = j;
    return p;
  endfunction

  // Logic function of an ungated first-level gate.
  function automatic logic gate_eval(fl_gate_e t, logic a, logic b);
    case (t)
      G_AND:   return a & b;
      G_OR:    return a | b;
      G_NAND:  return ~(a & b);
      G_NOR:   return ~(a | b);
      G_BUF:   return a;
      default: return ~a;
    endcase
  endfunction

endpackage
