// tb_mem_pkg: contents of the simulated next-level memory, shared by the
// behavioural L2 model and the testbenches that check returned data.
// Every 32-bit word at byte address a (word aligned) holds
// mem_word(a) = {a[15:0], a[31:16]} ^ 32'h5A5A_C3C3, so any data a cache
// returns can be checked against its address.
package tb_mem_pkg;
  function automatic logic [31:0] mem_word(logic [31:0] a);
    logic [31:0] w;
    w = {a[31:2], 2'b00};
    return {w[15:0], w[31:16]} ^ 32'h5A5A_C3C3;
  endfunction

  function automatic logic [255:0] mem_line(logic [31:0] a);
    logic [255:0] l;
    for (int k = 0; k < 8; k++) l[k*32 +: 32] = mem_word({a[31:5], 5'b0} + 32'(4*k));
    return l;
  endfunction
endpackage
