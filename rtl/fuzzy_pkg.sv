// fuzzy_pkg: widths and types shared by the fuzzy inference blocks.
//
// A membership grade is a 4-bit unsigned number (0 = not a member, 15 = full
// member); the fuzzification circuit handles seven rules; the area sums of the
// center-of-area defuzzifier are 10 bits wide. These three numbers follow the
// published design. The 64-entry depth of the membership RAMs is this design's
// own choice: it is the largest power of two whose worst-case area (64 x 15 =
// 960) still fits the 10-bit sums.
package fuzzy_pkg;
  localparam int unsigned MU_W    = 4;   // membership grade width
  localparam int unsigned N_RULES = 7;   // number of fuzzy rules
  localparam int unsigned AREA_W  = 10;  // width of the area adders and comparator
  localparam int unsigned ADDR_W  = 6;   // address width of the membership RAMs

  typedef logic [MU_W-1:0]   mu_t;
  typedef logic [AREA_W-1:0] area_t;
  typedef logic [ADDR_W-1:0] addr_t;
endpackage
