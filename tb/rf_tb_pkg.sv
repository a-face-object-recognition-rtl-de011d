// rf_tb_pkg: reference model and table contents shared by the testbenches of
// the resistive-fuse segmentation engine.
//
// The tables model a network with sigma*dt = 1/32 and g*dt = 1/5 in the
// engine's fixed-point scale (16 units per grey level):
//   LUT_1[x] = trunc(16 x / 32)                       (input conductance)
//   LUT_2[d] = trunc(16 d / 5) if |d| < delta, else 0  (resistive fuse)
// delta = LINEAR_DELTA gives a plain linear resistive network.
// node_update() is a behavioural statement of one KCL node update with
// explicit tables, written without reference to the RTL's phase schedule.
package rf_tb_pkg;

  localparam int NODE_MAX     = 4095;   // 12-bit node value, 4 fraction bits
  localparam int LINEAR_DELTA = 1000;   // larger than any pixel difference

  function automatic int idx_to_diff(int a);
    return (a < 256) ? a : a - 512;
  endfunction

  function automatic int lut1_fn(int x);
    return (16 * x) / 32;
  endfunction

  function automatic int lut2_fn(int d, int delta);
    if (d >= delta || d <= -delta) return 0;
    return (16 * d) / 5;
  endfunction

  // One node update. nb holds the four neighbour node values (up, down,
  // left, right), nv their validity. Returns the new node value, flags a
  // clamp and counts open fuses between differing pixels.
  function automatic int node_update(int oc, int ic, int nb[4], bit nv[4],
                                     const ref int t1[512], const ref int t2[512],
                                     output bit sat, output int cuts);
    int oci, acc, d, g, s;
    oci  = oc / 16;
    acc  = t1[(ic - oci) & 511];
    cuts = 0;
    for (int k = 0; k < 4; k++) begin
      if (nv[k]) begin
        d    = nb[k] / 16 - oci;
        g    = t2[d & 511];
        acc += g;
        if (d != 0 && g == 0) cuts++;
      end
    end
    s   = oc + acc;
    sat = (s < 0) || (s > NODE_MAX);
    if (s < 0) s = 0;
    if (s > NODE_MAX) s = NODE_MAX;
    return s;
  endfunction

endpackage
