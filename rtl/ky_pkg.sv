// ky_pkg: constants shared by the Knuth-Yao half-Gaussian sampler.
//
// Holds the FALCON base distribution chi (sigma0 = 1.8205, 19 values 0..18)
// as 72-bit integers P(X = i) * 2^72, the probability matrix from which the
// ROM contents are computed at elaboration time, and the default sizes of the
// FALCON configuration: theta = 72 bits of precision, 19 sampleable values,
// W = 9 index bits and L = 5 sample bits. The probabilities sum to exactly
// 2^72, so every path through the tree ends in a leaf after at most 72 bits.
// The IDLE_CODE value is this design's choice: 31, which no sample can take.
package ky_pkg;

  localparam int unsigned FALCON_THETA  = 72;  // bit precision of the probabilities
  localparam int unsigned FALCON_N      = 19;  // number of sampleable values 0..18
  localparam int unsigned FALCON_W      = 9;   // node index width for one random bit per cycle
  localparam int unsigned FALCON_L      = 5;   // sample width

  typedef logic [FALCON_THETA-1:0] falcon_prob_t;

  // P(X = i) * 2^72 for i = 0..18.
  localparam falcon_prob_t FALCON_CHI [FALCON_N] = '{
    72'd1697680241746640300030,
    72'd1459943456642912959616,
    72'd928488355018011056515,
    72'd436693944817054414619,
    72'd151893140790369201013,
    72'd39071441848292237840,
    72'd7432604049020375675,
    72'd1045641569992574730,
    72'd108788995549429682,
    72'd8370422445201343,
    72'd476288472308334,
    72'd20042553305308,
    72'd623729532807,
    72'd14354889437,
    72'd244322621,
    72'd3075302,
    72'd28626,
    72'd197,
    72'd1
  };

endpackage
