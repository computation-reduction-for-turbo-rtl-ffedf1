// bmu: branch metric unit, eq. (4) of the Max-Log-MAP decoder.
//
// For a binary RSC code every trellis edge carries one systematic bit u and one
// parity bit p, so only four branch metrics exist per trellis step. With the
// sign convention of tdec_pkg (positive LLR favours 1) the metric of an edge
// is gamma = u*(Lsys + Lapr) + p*Lpar: the intrinsic part is the channel LLR of
// the systematic and parity bits, the a-priori part is the extrinsic LLR from
// the other constituent decoder. Output g[{u,p}]; g[0] is 0 by construction
// (the u=0, p=0 edges carry no metric) and is kept so that every edge is
// indexed the same way. Purely combinational.
module bmu
  import tdec_pkg::*;
(
  input  chan_t      sys_llr,   // systematic channel LLR
  input  chan_t      par_llr,   // parity channel LLR
  input  ext_t       apr_llr,   // a-priori LLR
  output gamma_vec_t g          // g[{u,p}]
);
  gamma_t lsa;
  always_comb begin
    lsa  = gamma_t'(sys_llr) + gamma_t'(apr_llr);
    g[0] = '0;
    g[1] = gamma_t'(par_llr);
    g[2] = lsa;
    g[3] = lsa + gamma_t'(par_llr);
  end
endmodule
