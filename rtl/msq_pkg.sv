// msq_pkg -- sizes and control bundle shared by the word-serial GF(2^k)
// multiplier-squarer.
//
// The field size k is split into NW = ceil(k/l) words of l bits. When l does
// not divide k, gamma = NW*l - k zero columns pad the operands at their least
// significant end, so every word is full. The main loop runs g = ceil(k/2)
// iterations, each NW clock cycles long, and is followed by one post-processing
// pass of NW cycles: (g+1)*NW cycles per operation. These formulas follow the
// scheduling of the design (Eq. (14)-(18) of its derivation). The control
// struct groups the strobes the controller sends to the datapath; its
// encoding (active-low u and v, one bit per strobe) is this design's choice.
package msq_pkg;

  // ceil(a/b) for positive integers
  function automatic int ceil_div(input int a, input int b);
    return (a + b - 1) / b;
  endfunction

  // number of words per operand, L = ceil(k/l)
  function automatic int num_words(input int k, input int l);
    return ceil_div(k, l);
  endfunction

  // number of main iterations, g = ceil(k/2)
  function automatic int num_iters(input int k);
    return ceil_div(k, 2);
  endfunction

  // clock cycles of one complete operation, (g+1)*L
  function automatic int latency(input int k, input int l);
    return (num_iters(k) + 1) * num_words(k, l);
  endfunction

  // Strobes from the controller to the datapath, valid during one time
  // instance (clock cycle).
  typedef struct packed {
    logic load;      // capture the operands into the input registers
    logic fifo_clr;  // clear FIFO-C/D/Q/R (initial zero words)
    logic fifo_en;   // advance all FIFOs by one word
    logic in_sel;    // M_a, M_h, M_h' pick the input registers (1) or FIFOs (0)
    logic ss_u_n;    // u of the semi-systolic array, active low
    logic ss_v_n;    // v of the semi-systolic array, active low
    logic bits_adv;  // move to the next a_{2i-2}, a_{2i-1}, b_{2i-2}, b_{2i-1}
    logic pp_en;     // pass C/D/Q/R words into the post-processing array
    logic pp_u_n;    // u of the post-processing array, active low
    logic pp_v_n;    // v of the post-processing array, active low
    logic out_load;  // shift one word into registers P and S
  } msq_ctrl_t;

endpackage
