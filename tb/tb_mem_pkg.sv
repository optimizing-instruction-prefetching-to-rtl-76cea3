// tb_mem_pkg: the contents of the simulated main memory. Every 32-bit word is a fixed
// function of its address, so a testbench can check any fetched instruction without
// a stored image.
package tb_mem_pkg;
  function automatic logic [31:0] mem_word(logic [31:0] addr);
    logic [31:0] a;
    a = {addr[31:2], 2'b00};
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_C3C3;
  endfunction
endpackage
