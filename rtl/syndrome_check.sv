// syndrome_check: tests the hard decisions against every parity check of H.
//
// syndrome[c] is the XOR of the bits of the variable nodes on check c;
// the word is a valid codeword, and decoding may stop, when every syndrome
// bit is 0. Purely combinational.
module syndrome_check #(
  parameter int M = ldpc_pkg::M_DEF,
  parameter int N = ldpc_pkg::N_DEF,
  parameter bit [0:M-1][0:N-1] H = ldpc_pkg::H_EXAMPLE
) (
  input  logic [N-1:0] bits,       // hard decisions, bits[v] for variable v
  output logic [M-1:0] syndrome,   // one parity result per check
  output logic         valid       // all parity checks satisfied
);

  always_comb begin
    for (int c = 0; c < M; c++) begin
      syndrome[c] = 1'b0;
      for (int v = 0; v < N; v++)
        if (H[c][v]) syndrome[c] = syndrome[c] ^ bits[v];
    end
    valid = ~|syndrome;
  end

endmodule
