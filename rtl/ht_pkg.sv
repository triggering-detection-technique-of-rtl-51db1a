// ht_pkg: types shared by the hazard-free combinational system and its
// Trojan-trigger guard.
//
// clc_in_t bundles the five primary inputs x4..x0 of the combinational
// logic circuit (CLC). The packed order puts x4 in the most significant bit,
// so a clc_in_t read as a 5-bit number is the minterm index used when the
// function is written as a list of minterms (x4 x3 x2 x1 x0 = 01100 is 12).
package ht_pkg;

  timeunit 1ns;
  timeprecision 1ps;

  typedef struct packed {
    logic x4;
    logic x3;
    logic x2;
    logic x1;
    logic x0;
  } clc_in_t;

endpackage
