// tb_pkg: helpers shared by the testbenches of the mesh platform.
//
// init_word(addr) is the content every memory model holds at an address that
// no test has written: a fixed mix of the address bits, so any read of it
// can be checked without a copy of the memory.
package tb_pkg;
  function automatic logic [31:0] init_word(logic [31:0] addr);
    return addr ^ {addr[15:0], addr[31:16]} ^ 32'h5A3C_96E1;
  endfunction
endpackage
