// csla_pkg: constants shared by the carry select adder modules.
//
// CSLA_WIDTH is the default operand width n of every module in the adder.
// The width is this design's own choice (32 bits); every module takes it as a
// parameter, so any width of one bit or more can be built.
package csla_pkg;
  parameter int unsigned CSLA_WIDTH = 32;
endpackage
