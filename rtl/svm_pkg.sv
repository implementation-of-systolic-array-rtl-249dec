// svm_pkg: shared widths, number formats and types of the systolic SVM
// classifier.
//
// Test-vector elements and support-vector elements are 13-bit two's
// complement fixed-point numbers with 8 fraction bits (Q5.8). The word length
// and binary point follow the 13-digit CSD words of the conversion results the
// design is specified with (4.2 -> 1075/256, 4.5 -> 100.1, ...). The alpha
// coefficients (16-bit Q8.8, signed, alpha >= 0), the 64-bit accumulators and
// the two-dimensional feature space of the reference problems are fixed here;
// the widths of alpha and of the accumulators are this design's own choice.
package svm_pkg;

  parameter int unsigned DATA_W  = 13;  // test / support vector element, Q5.8
  parameter int unsigned FRAC_W  = 8;   // fraction bits of every fixed-point value
  parameter int unsigned DIM     = 2;   // feature dimensions (test vector is 1x2)
  parameter int unsigned ALPHA_W = 16;  // alpha coefficient, Q8.8
  parameter int unsigned ACC_W   = 64;  // kernel values, products and class sums

  typedef logic signed [DATA_W-1:0]  data_t;
  typedef logic signed [ALPHA_W-1:0] alpha_t;
  typedef logic signed [ACC_W-1:0]   acc_t;

  // One CSD word: digit i is 0 (s=0,m=0), +1 (s=0,m=1) or -1 (s=1,m=1).
  typedef struct packed {
    logic [DATA_W-1:0] s;  // sign bits   (xis)
    logic [DATA_W-1:0] m;  // magnitude bits (xim)
  } csd_t;

  // Kernel of the processing elements.
  typedef enum logic {
    KERNEL_LINEAR = 1'b0,  // K(x,z) = x.z, built from CSD shift-and-add only
    KERNEL_POLY   = 1'b1   // K(x,z) = (1 + x.z)^d, the power uses multipliers
  } kernel_e;

endpackage
