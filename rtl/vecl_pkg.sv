// vecl_pkg: word size shared by the vector length unit sqrt(X^2 + Y^2).
// The vector components X and Y are 16-bit unsigned integers; their sum of
// squares is 2*COMP_W = 32 bits wide and the length COMP_W = 16 bits wide.
// Modules take this as a parameter default and can be resized per instance.
package vecl_pkg;
  localparam int unsigned COMP_W = 16;   // width of X, Y and the length
endpackage
