// lake_tb_pkg: helpers the benches share to build controller configurations.
//
// mk_cfg() takes a loop nest the way a scheduler states it (extents, affine
// schedule strides/offset, affine address strides/offset for one or two
// address generators) and returns the ctrl_cfg_t the hardware needs, with
// strides converted to deltas by lake_pkg::to_delta. Unused dimensions get
// extent 1.
package lake_tb_pkg;
  import lake_pkg::*;

  typedef int ivec_t [DIM];

  function automatic ctrl_cfg_t mk_cfg(
      input int    dim,
      input ivec_t extent,
      input ivec_t sched_stride, input int sched_offset,
      input ivec_t addr_stride,  input int addr_offset,
      input ivec_t addr2_stride, input int addr2_offset);
    ctrl_cfg_t c;
    logic [DIM-1:0][CNT_W-1:0] e, s, a, b;
    c = '0;
    c.dim = DIM_W'(dim);
    for (int d = 0; d < DIM; d++) begin
      e[d] = (d < dim) ? CNT_W'(extent[d]) : CNT_W'(1);
      s[d] = (d < dim) ? CNT_W'(sched_stride[d]) : '0;
      a[d] = (d < dim) ? CNT_W'(addr_stride[d]) : '0;
      b[d] = (d < dim) ? CNT_W'(addr2_stride[d]) : '0;
    end
    c.extent       = e;
    c.sched_delta  = to_delta(s, e);
    c.sched_offset = CNT_W'(sched_offset);
    c.addr_delta   = to_delta(a, e);
    c.addr_offset  = CNT_W'(addr_offset);
    c.addr2_delta  = to_delta(b, e);
    c.addr2_offset = CNT_W'(addr2_offset);
    return c;
  endfunction

  // 1-D configuration: n events at t0, t0+ts, ..., addresses a0 + k*as
  // (and b0 + k*bs for the second generator).
  function automatic ctrl_cfg_t mk_cfg_1d(input int n, input int t0, input int ts,
                                          input int a0, input int as_,
                                          input int b0 = 0, input int bs = 0);
    ivec_t e, s, a, b;
    e = '{default: 1}; s = '{default: 0}; a = '{default: 0}; b = '{default: 0};
    e[0] = n; s[0] = ts; a[0] = as_; b[0] = bs;
    return mk_cfg(1, e, s, t0, a, a0, b, b0);
  endfunction

endpackage
