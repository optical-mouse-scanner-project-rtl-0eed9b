// oms_tb_pkg: helpers shared by the scanner testbenches.
//
// pixval() is the image the sensor model returns: pixel a of pixel dump
// number f. Testbenches use the same formula to predict what must appear
// in the sample queue, the aggregate and on screen.
package oms_tb_pkg;

  function automatic logic [5:0] pixval(input int unsigned f, input int unsigned a);
    return 6'((a * 5 + (a >> 4) * 3 + f * 11 + 1) & 63);
  endfunction

endpackage
