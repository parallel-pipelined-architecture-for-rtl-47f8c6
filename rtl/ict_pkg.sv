// ict_pkg: constants shared by the 8x8 ICT(10,9,6,2,3,1) processor.
//
// The integer kernel J has the entries a=10, b=9, c=6, d=2, e=3, f=1 and
// g=1. The normalization matrix K is diagonal with K(l) = 1/||row l of J||:
//   K(0)=K(4) = 1/sqrt(8g^2)                = 1/sqrt(8)
//   K(2)=K(6) = 1/sqrt(4(e^2+f^2))          = 1/sqrt(40)
//   K(odd)    = 1/sqrt(2(a^2+b^2+c^2+d^2))  = 1/sqrt(442)
// A 2-D coefficient is scaled by K(l)*K(k); there are six distinct products,
// stored here as round(K(l)*K(k) * 2^NORM_FRAC). The kernel values are the
// document's; the fixed-point format of the products is this design's choice.
package ict_pkg;

  // Largest row gain of J is 2*(a+b+c+d) = 54 < 2^6: a 1-D pass grows the
  // word by 6 bits.
  localparam int J_GROWTH = 6;

  // Number of fractional bits of the normalization constants.
  localparam int NORM_FRAC = 24;
  localparam int NORM_W    = 23;   // unsigned width of the largest constant (2^21) plus margin

  // Class of a frequency index: 0 for 0/4 (g rows), 1 for odd rows, 2 for 2/6.
  typedef enum logic [1:0] {CLS_G = 2'd0, CLS_ODD = 2'd1, CLS_EF = 2'd2} row_cls_e;

  function automatic row_cls_e row_class(input logic [2:0] idx);
    if (idx[0])        return CLS_ODD;
    else if (idx[1])   return CLS_EF;
    else               return CLS_G;
  endfunction

  // round(K(l)K(k) * 2^24) for each pair of classes.
  function automatic logic [NORM_W-1:0] norm_coef(input logic [2:0] l, input logic [2:0] k);
    row_cls_e cl, ck;
    cl = row_class(l);
    ck = row_class(k);
    unique case ({cl, ck})
      {CLS_G,   CLS_G  }:                     return 23'd2097152;  // 1/8
      {CLS_G,   CLS_ODD}, {CLS_ODD, CLS_G  }: return 23'd282139;   // 1/sqrt(3536)
      {CLS_G,   CLS_EF }, {CLS_EF,  CLS_G  }: return 23'd937875;   // 1/sqrt(320)
      {CLS_ODD, CLS_ODD}:                     return 23'd37958;    // 1/442
      {CLS_ODD, CLS_EF }, {CLS_EF,  CLS_ODD}: return 23'd126177;   // 1/sqrt(17680)
      {CLS_EF,  CLS_EF }:                     return 23'd419430;   // 1/40
      default:                                return '0;
    endcase
  endfunction

endpackage
