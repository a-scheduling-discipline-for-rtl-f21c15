// alg_pkg: constants shared by the ALG (Asynchronous Latency Guarantee) link.
//
// The defaults describe the reference link: 8 virtual channels (VCs), 16-bit
// flits and a physical link pipelined in 3 stages. All timing in this RTL is
// counted in flit-times; one flit-time is one clock cycle, the time the link
// needs to carry one flit.
//
// Priority convention: VC index 0 is the highest priority (priority level
// Q = 1), VC index N-1 the lowest (Q = N).
package alg_pkg;

  parameter int unsigned ALG_N_VC        = 8;
  parameter int unsigned ALG_FLIT_W      = 16;
  parameter int unsigned ALG_LINK_STAGES = 3;

  // Mask of the channels with lower priority than channel idx (higher index).
  function automatic logic [31:0] lower_mask(input int unsigned n, input int unsigned idx);
    logic [31:0] m;
    m = '0;
    for (int unsigned j = 0; j < 32; j++)
      if (j > idx && j < n) m[j] = 1'b1;
    return m;
  endfunction

endpackage
