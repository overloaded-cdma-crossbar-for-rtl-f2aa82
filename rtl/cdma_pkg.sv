// cdma_pkg - code definitions shared by the ACDMA and OCI crossbars.
//
// Both crossbars spread data with Walsh-Hadamard codes of length N (N a
// power of two). Codes are rows of the Sylvester Hadamard matrix, held in
// unipolar form: chip j of code k is the parity of (k & j), a 0 standing for
// the bipolar value +1 and a 1 for -1. Walsh codes are the family the
// document uses; this row ordering and the 0 -> +1 mapping are choices of
// this design.
//
// The overloaded (OCI) crossbar serves M = 2N-2 ports with codes of length
// N. Ports 0..N-2 are orthogonal ports and use Walsh codes 1..N-1 (code 0,
// all +1, is left unused). Ports N-1..2N-3 are TDMA ports: port p owns time
// slot (chip) p-N+2, one of 1..N-1, and sends its bit only in that chip.
// Chip 0 carries no TDMA bit and serves as the parity reference of the
// TDMA decoders. This port-to-code map is this design's choice.
package cdma_pkg;

  typedef enum logic {SPREAD_ORTH = 1'b0, SPREAD_TDMA = 1'b1} spread_mode_e;

  // Chip j of Walsh code k (unipolar; 1 means the bipolar value -1).
  function automatic logic walsh_chip(input int unsigned k, input int unsigned j);
    return ^(k & j);
  endfunction

  // Spreading mode of OCI port p for code length n.
  function automatic spread_mode_e oci_mode(input int unsigned p, input int unsigned n);
    return (p < n - 1) ? SPREAD_ORTH : SPREAD_TDMA;
  endfunction

  // Chip j of the code of OCI port p for code length n: a Walsh chip for an
  // orthogonal port, a one-hot time-slot chip for a TDMA port.
  function automatic logic oci_chip(input int unsigned p, input int unsigned j,
                                    input int unsigned n);
    if (p < n - 1) return walsh_chip(p + 1, j);
    return (j == p - n + 2);
  endfunction

endpackage
