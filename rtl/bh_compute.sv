// bh_compute: the Barnes-Hut compute stage (one traversal step per ING).
//
// For an ING, the slim-octree entry it points at and the position of its
// body, it does what the original design's compute kernel does:
//   leaf                     -> add the leaf's force, node = node + 1
//   far from a small node    -> add the node's force, node = node.skip
//   otherwise                -> recurse: node = node + 1, no force
// "Far from a small node" is the usual opening test size/dist < theta,
// evaluated without a square root as size^2 < THETA2 * dist^2.
// The force added to the gradient is  m * d / (|d|^2 + SOFT2)^(3/2),  with
// d = centre_of_mass - body and the gravitational constant taken as 1.
//
// Pipeline, two register stages, one ING per cycle:
//   A: differences d, |d|^2, opening test, next node index
//   B: r = isqrt(|d|^2 + SOFT2), f = m / r^3, gradient += f * d
// All values are Q16.16; |d|^2 is kept as Q32.32, f as an unsigned Q.48
// fraction, intermediates are 128 bits wide, and results are truncated.
// en is the PE's configuration select: the stage only moves data while it
// is the active configuration; otherwise everything it holds stays in place.
//
// Interface: in_valid/in_ready/in_data (ING, node, body), out_valid/
// out_ready/out_ing. Timing: latency 2 cycles while enabled, throughput 1.
// The kernel's three cases, the skip pointer and the ING come from the
// original design; the fixed-point number format, the softening term, theta and
// G = 1 are this design's own choices.
module bh_compute
  import bh_pkg::*;
#(
  // theta^2 in Q16.16 (theta = 0.5)
  parameter logic [31:0] THETA2 = 32'h0000_4000,
  // softening length^2 in Q16.16 (eps = 1/16)
  parameter logic [31:0] SOFT2  = 32'h0000_0100
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        in_valid,
  input  compute_in_t in_data,
  output logic        in_ready,
  output logic        out_valid,
  output ing_t        out_ing,
  input  logic        out_ready,
  output logic        busy,
  output logic        evt_leaf,
  output logic        evt_skip,
  output logic        evt_recurse
);

  typedef logic signed [127:0] wide_t;

  // ---------------- stage A (combinational part) ----------------
  wide_t       a_d [3];
  logic [127:0] a_dist2, a_size2, a_lhs, a_rhs;
  logic        a_far, a_use;
  idx_t        a_next;

  always_comb begin
    a_d[0]  = wide_t'(in_data.node.com.x) - wide_t'(in_data.body.x);
    a_d[1]  = wide_t'(in_data.node.com.y) - wide_t'(in_data.body.y);
    a_d[2]  = wide_t'(in_data.node.com.z) - wide_t'(in_data.body.z);
    a_dist2 = 128'(a_d[0] * a_d[0]) + 128'(a_d[1] * a_d[1]) + 128'(a_d[2] * a_d[2]);
    a_size2 = 128'(wide_t'(in_data.node.size) * wide_t'(in_data.node.size));
    a_lhs   = a_size2 << FRAC_W;
    a_rhs   = 128'(THETA2) * a_dist2;
    a_far   = (a_lhs < a_rhs);
    a_use   = in_data.node.is_leaf || a_far;
    a_next  = (!in_data.node.is_leaf && a_far) ? in_data.node.skip : in_data.ing.node + 1'b1;
  end

  // ---------------- stage A registers ----------------
  logic         va, vb;
  ing_t         ra_ing;
  logic         ra_use;
  fix_t         ra_mass;
  wide_t        ra_d [3];
  logic [127:0] ra_r2;
  ing_t         rb_ing;

  logic adv;
  assign adv       = en && (!vb || out_ready);
  assign in_ready  = adv;
  assign out_valid = en && vb;
  assign out_ing   = rb_ing;
  assign busy      = va || vb;

  assign evt_leaf    = in_valid && in_ready && in_data.node.is_leaf;
  assign evt_skip    = in_valid && in_ready && !in_data.node.is_leaf && a_far;
  assign evt_recurse = in_valid && in_ready && !in_data.node.is_leaf && !a_far;

  // ---------------- stage B (combinational part) ----------------
  function automatic logic [63:0] isqrt128(input logic [127:0] v);
    logic [127:0] rem, root, trial;
    rem  = v;
    root = '0;
    for (int b = 63; b >= 0; b--) begin
      trial = root | (128'd1 << (2 * b));
      if (rem >= trial) begin
        rem  = rem - trial;
        root = (root >> 1) | (128'd1 << (2 * b));
      end else begin
        root = root >> 1;
      end
    end
    return root[63:0];
  endfunction

  logic [63:0]  b_r;      // Q16.16
  logic [127:0] b_den;    // r^3 as Q48.48
  logic [127:0] b_num;    // mass as Q.96
  logic [127:0] b_f;      // m / r^3 as Q.48
  ing_t         b_ing;

  always_comb begin
    b_r   = isqrt128(ra_r2);
    b_den = ra_r2 * 128'(b_r);
    b_num = 128'($unsigned(ra_mass)) << 80;
    b_f   = (b_den != '0) ? (b_num / b_den) : '0;
    b_ing = ra_ing;
    if (ra_use) begin
      b_ing.gradient.x = ra_ing.gradient.x + fix_t'((wide_t'(b_f) * ra_d[0]) >>> 48);
      b_ing.gradient.y = ra_ing.gradient.y + fix_t'((wide_t'(b_f) * ra_d[1]) >>> 48);
      b_ing.gradient.z = ra_ing.gradient.z + fix_t'((wide_t'(b_f) * ra_d[2]) >>> 48);
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      ra_ing      <= in_data.ing;
      ra_ing.node <= a_next;
      ra_use      <= a_use;
      ra_mass     <= in_data.node.mass;
      ra_d        <= a_d;
      ra_r2       <= a_dist2 + (128'(SOFT2) << FRAC_W);
      rb_ing      <= b_ing;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      va <= 1'b0;
      vb <= 1'b0;
    end else if (adv) begin
      va <= in_valid;
      vb <= va;
    end
  end

  a_mass_nonneg: assert property (@(posedge clk) disable iff (!rst_n)
                                  (in_valid && in_ready) |-> !in_data.node.mass[31]);

endmodule
