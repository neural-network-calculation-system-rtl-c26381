// nn_ref_pkg: reference arithmetic and packet-stream encoding for the testbenches.
//
// ref_neuron computes one neuron the way the hardware is specified, with plain
// 64-bit integer arithmetic:
//   y = low_N( max(0, ((sum_j floor(x_j * w_j / 2^S1)) >> S2) + b) )
// layer_bytes / input_bytes build the byte sequences the host sends: every value
// least significant byte first, weights and metadata as 3-byte words (P, max
// node id, then for each neuron its bias and I weights), inputs as 2-byte words.
package nn_ref_pkg;

  function automatic longint ref_neuron(input longint x[], input longint w[], input longint b,
                                        input int n, input int s1, input int s2);
    longint acc = 0;
    longint v;
    for (int j = 0; j < x.size(); j++) acc += (x[j] * w[j]) >>> s1;
    v = (acc >>> s2) + b;
    if (v < 0) v = 0;
    return v & ((64'd1 << n) - 1);
  endfunction

  // Sign-extend the low 'bits' bits of v.
  function automatic longint sx(input longint v, input int bits);
    longint m = 64'd1 << (bits - 1);
    v = v & ((64'd1 << bits) - 1);
    return (v ^ m) - m;
  endfunction

  function automatic void push_word(ref byte unsigned q[$], input longint v, input int nbytes);
    for (int k = 0; k < nbytes; k++) q.push_back(byte'((v >> (8 * k)) & 8'hff));
  endfunction

endpackage
