// nexus_pkg: constants and helper functions shared by the Nexus interconnect.
//
// The interconnect moves bursts: a variable number of words, each with a
// data field and a tail bit, where tail=1 marks the last word. A 4-bit
// control field travels beside the first word: TO (destination port) on the
// way into the crossbar, FROM (source port) on the way out. The default
// configuration is 16 ports, 36-bit data, 1 tail bit and 4-bit TO/FROM,
// the configuration the design is built around.
//
// Port numbers inside the crossbar are carried as two 1-of-4 codes (a low
// digit and a high digit), as in a delay-insensitive channel: exactly one
// rail of each code is high when a value is present, and all rails low
// ("neutral") means no value. The functions below convert between binary
// port numbers and that encoding.
package nexus_pkg;

  localparam int unsigned NX_NPORTS = 16;// ports on the crossbar
  localparam int unsigned NX_DATA_W = 36;// data bits per word
  localparam int unsigned NX_CTRL_W = 4;// TO / FROM width
  localparam int unsigned NX_CHUNK_W = 4;// width of one stacked crossbar slice

  typedef logic [3:0] e1of4_t;           // one 1-of-4 code, 4'b0000 = neutral

  // Binary digit (0..3) to 1-of-4 rails.
  function automatic e1of4_t e1of4_enc(input logic [1:0] d);
    e1of4_t r;
    r = '0;
    r[d] = 1'b1;
    return r;
  endfunction

  // 1-of-4 rails to binary digit; assumes a valid (one-hot) code.
  function automatic logic [1:0] e1of4_dec(input e1of4_t r);
    logic [1:0] d;
    d = '0;
    for (int k = 0; k < 4; k++)
      if (r[k]) d = 2'(k);
    return d;
  endfunction

  // A code is valid when exactly one rail is high.
  function automatic logic e1of4_valid(input e1of4_t r);
    return $onehot(r);
  endfunction

endpackage
