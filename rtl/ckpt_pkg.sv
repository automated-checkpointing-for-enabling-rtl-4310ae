// ckpt_pkg: types and constants shared by the checkpointing circuits.
//
// The checkpointing circuits (CPCs) form a tree that follows the module
// hierarchy of the checkpointed design. Every tree edge is a pair of packed
// structs: cpc_down_t travels from a parent CPC to a child CPC and cpc_up_t
// travels back. Both directions carry a valid/ready word stream:
//   save    : words move up   (child -> parent), up_valid/up_ready, up_last
//             marks the last word of the child's whole subtree.
//   restore : words move down (parent -> child), dn_valid/dn_ready, dn_last
//             is raised by the child together with dn_ready for the word that
//             completes its subtree.
// A transfer happens in a cycle where valid and ready are both high. A
// transaction on a subtree is opened by a one-cycle `start` with `op_restore`
// telling the direction. The word width, the start pulse and the last flags
// are choices of this implementation; the tree itself and its depth-first
// order follow the published structure.
package ckpt_pkg;

  // Width of one checkpoint word, in the tree and in the non-volatile memory.
  localparam int unsigned CP_DW = 32;

  typedef logic [CP_DW-1:0] cp_word_t;

  // Header word kept at NVM address 0: magic number in the upper half, number
  // of checkpoint words that follow in the lower half. Zero means "no valid
  // checkpoint".
  localparam logic [15:0] CP_MAGIC = 16'hC4E7;

  typedef struct packed {
    logic     start;       // open a save or restore on the subtree (1 cycle)
    logic     op_restore;  // with start: 0 = save, 1 = restore
    logic     up_ready;    // parent accepts the saved word on up_data
    logic     dn_valid;    // restore word on dn_data is valid
    cp_word_t dn_data;
  } cpc_down_t;

  typedef struct packed {
    logic     up_valid;    // saved word on up_data is valid
    cp_word_t up_data;
    logic     up_last;     // this is the last saved word of the subtree
    logic     dn_ready;    // subtree accepts the restore word
    logic     dn_last;     // the word accepted now completes the subtree
  } cpc_up_t;

  // States of the example application's FSM (five states, loop S2 <-> S3).
  typedef enum logic [2:0] {
    S1 = 3'd0,   // wait for start, load operands
    S2 = 3'd1,   // compare
    S3 = 3'd2,   // step, loop-end
    S4 = 3'd3,   // write result
    S5 = 3'd4    // done
  } app_state_t;

  // Control from the application FSM (top module) to its datapath module.
  typedef struct packed {
    logic load;  // S1: take the operands, clear the iteration count
    logic cmp;   // S2: compare the operands, form the difference
    logic step;  // S3 with operands unequal: subtract, count the iteration
  } app_ctl_t;

endpackage
