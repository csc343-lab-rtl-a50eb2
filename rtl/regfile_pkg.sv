// regfile_pkg: widths and types shared by the 4 x 4 register file lab design.
// The register file holds four registers (addresses 00..11) of four bits each;
// the 7-segment code is seven bits, ordered a..g from the most significant bit,
// active low (a 0 lights a segment).
package regfile_pkg;
  parameter int unsigned DATA_W = 4;  // bits per register
  parameter int unsigned ADDR_W = 2;  // register number width (4 registers)

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [6:0]        seg7_t;   // {a,b,c,d,e,f,g}, active low
endpackage
