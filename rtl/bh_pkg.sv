// bh_pkg: types and constants shared by the Barnes-Hut pipeline.
//
// The ING record (Index, Node, Gradient) is the whole traversal state of one
// body: its index, the position reached in the slim octree, and the running
// gradient (force) sum. The slim octree is stored as an array in pre-order;
// every entry carries a "skip" pointer to the first entry after its subtree,
// so a traversal is a single index that either steps by one (recurse) or
// jumps to skip (use the node's centre of mass). The ING layout, the skip
// pointer and the 32-bit index fields follow the original Fifer Barnes-Hut design.
//
// Numbers are signed fixed point Q16.16 (32 bits). The original design uses
// 32-bit floating point; fixed point is this design's own choice, made to keep
// the arithmetic small and exact to check. All widths are 32 bits as in the
// original design's ING record.
package bh_pkg;

  localparam int unsigned FIX_W  = 32;  // Q16.16 word
  localparam int unsigned FRAC_W = 16;
  localparam int unsigned IDX_W  = 32;  // body index and node index width

  typedef logic signed [FIX_W-1:0] fix_t;
  typedef logic [IDX_W-1:0]        idx_t;

  typedef struct packed {
    fix_t x;
    fix_t y;
    fix_t z;
  } vec3_t;

  // Traversal state of one body.
  typedef struct packed {
    idx_t  index;     // body index, never changes
    idx_t  node;      // current slim-octree entry
    vec3_t gradient;  // running force sum
  } ing_t;

  // One entry of the slim octree: an inner node or a leaf (one body).
  typedef struct packed {
    logic  is_leaf;
    idx_t  skip;      // first entry after this node's subtree
    fix_t  mass;      // total mass (leaf: body mass)
    vec3_t com;       // centre of mass (leaf: body position)
    fix_t  size;      // edge length of the node's cube (leaf: unused)
  } tree_node_t;

  // ING together with the node the DRM fetched for it.
  typedef struct packed {
    ing_t       ing;
    tree_node_t node;
  } ing_node_t;

  // Everything the compute stage needs for one pass.
  typedef struct packed {
    ing_t       ing;
    tree_node_t node;
    vec3_t      body;   // position of body ing.index
  } compute_in_t;

  // PE configurations (the two stages time-multiplexed on one PE).
  typedef enum logic [0:0] {
    CFG_MANAGE  = 1'b0,
    CFG_COMPUTE = 1'b1
  } cfg_e;

  // Single-cycle event pulses of one PE, brought out for observation.
  typedef struct packed {
    logic cfg_switch;      // scheduler decided to switch configuration
    logic pool_start;      // management stage started a new pool
    logic retire;          // an ING reached the end of the tree
    logic leaf;            // compute: leaf force added
    logic skip;            // compute: node used, children skipped
    logic recurse;         // compute: descended into children
    logic sort_pop_full;   // sorter released because it was full
    logic sort_pop_empty;  // sorter released because its output queue was empty
    logic mem_stall;       // a DRM request waited for memory
  } pe_evt_t;

endpackage
