// cpc_node: checkpointing circuit (CPC) embedded in one module of the design.
//
// Every module of the checkpointed design holds one CPC. The CPC is wired to
// the registers of its own module that have to survive a power loss and to
// the CPCs of the modules it instantiates, and it is itself a child of the
// CPC of its parent module. Together they form a tree whose root is the only
// one connected to the non-volatile memory. Data move through the tree in a
// depth-first walk: on a save this CPC first sends its own NLOCAL register
// words, in index order, and then forwards the complete streams of its
// children 0, 1, ... NCHILD-1 one after the other; a restore delivers words
// in the same order and the CPC keeps the first NLOCAL for its module and
// passes the rest on to its children in turn. The tree and the depth-first
// order follow the published structure; sending the module's own registers
// before those of its children, the word format and the stream handshakes
// (see ckpt_pkg) are choices of this implementation.
//
// While the words of a child are in transit the child stream is connected
// through combinationally, so a word passes the whole tree in one cycle and
// every transfer in the tree is one word per cycle once a subtree is open.
// Opening a child costs one cycle (its start pulse).
//
// Register interface: regs_q are the module's live registers, read while the
// design is held still during a save. On a restore the incoming words are
// collected in a shadow copy; regs_load pulses for one cycle after the last
// local word arrived, and the module then loads regs_d into its registers.
module cpc_node
  import ckpt_pkg::*;
#(
  parameter int unsigned NLOCAL = 1,   // words of this module's registers (>= 1)
  parameter int unsigned NCHILD = 0,   // number of child CPCs
  localparam int unsigned NCH   = (NCHILD > 0) ? NCHILD : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // link to the parent CPC
  input  cpc_down_t                   parent_dn,
  output cpc_up_t                     parent_up,
  // links to the child CPCs
  output cpc_down_t [NCH-1:0]         child_dn,
  input  cpc_up_t   [NCH-1:0]         child_up,
  // this module's registers
  input  logic [NLOCAL-1:0][CP_DW-1:0] regs_q,
  output logic [NLOCAL-1:0][CP_DW-1:0] regs_d,
  output logic                        regs_load,
  output logic                        busy       // a save or restore is open
);

  localparam int unsigned IW = (NLOCAL > 1) ? $clog2(NLOCAL) : 1;
  localparam int unsigned CW = (NCH > 1) ? $clog2(NCH) : 1;

  typedef enum logic [1:0] {N_IDLE, N_LOCAL, N_CHILD} node_state_t;

  node_state_t st;
  logic        op_rest;     // current transaction is a restore
  logic [IW-1:0] widx;      // next local word
  logic [CW-1:0] cidx;      // child in transit
  logic        kick;        // send start to child cidx this cycle
  logic [NLOCAL-1:0][CP_DW-1:0] shadow;

  logic local_last;
  logic child_last;
  logic local_hs;
  logic child_done;

  assign local_last = (widx == IW'(NLOCAL - 1));
  assign child_last = (cidx == CW'(NCH - 1));
  assign busy       = (st != N_IDLE);
  assign regs_d     = shadow;

  // Stream steering.
  always_comb begin
    parent_up = '0;
    child_dn  = '0;
    unique case (st)
      N_LOCAL: begin
        if (!op_rest) begin
          parent_up.up_valid = 1'b1;
          parent_up.up_data  = regs_q[widx];
          parent_up.up_last  = local_last && (NCHILD == 0);
        end else begin
          parent_up.dn_ready = 1'b1;
          parent_up.dn_last  = local_last && (NCHILD == 0);
        end
      end
      N_CHILD: begin
        child_dn[cidx].start      = kick;
        child_dn[cidx].op_restore = op_rest;
        if (!op_rest) begin
          parent_up.up_valid       = child_up[cidx].up_valid;
          parent_up.up_data        = child_up[cidx].up_data;
          parent_up.up_last        = child_up[cidx].up_last && child_last;
          child_dn[cidx].up_ready  = parent_dn.up_ready;
        end else begin
          child_dn[cidx].dn_valid  = parent_dn.dn_valid;
          child_dn[cidx].dn_data   = parent_dn.dn_data;
          parent_up.dn_ready       = child_up[cidx].dn_ready;
          parent_up.dn_last        = child_up[cidx].dn_last && child_last;
        end
      end
      default: ;
    endcase
  end

  assign local_hs   = op_rest ? parent_dn.dn_valid : parent_dn.up_ready;
  assign child_done = op_rest
      ? (parent_dn.dn_valid && child_up[cidx].dn_ready && child_up[cidx].dn_last)
      : (child_up[cidx].up_valid && parent_dn.up_ready && child_up[cidx].up_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= N_IDLE;
      op_rest   <= 1'b0;
      widx      <= '0;
      cidx      <= '0;
      kick      <= 1'b0;
      shadow    <= '0;
      regs_load <= 1'b0;
    end else begin
      regs_load <= 1'b0;
      kick      <= 1'b0;
      unique case (st)
        N_IDLE: if (parent_dn.start) begin
          op_rest <= parent_dn.op_restore;
          widx    <= '0;
          st      <= N_LOCAL;
        end
        N_LOCAL: if (local_hs) begin
          if (op_rest) shadow[widx] <= parent_dn.dn_data;
          if (local_last) begin
            regs_load <= op_rest;
            if (NCHILD > 0) begin
              st   <= N_CHILD;
              cidx <= '0;
              kick <= 1'b1;
            end else begin
              st <= N_IDLE;
            end
          end else begin
            widx <= widx + 1'b1;
          end
        end
        N_CHILD: if (child_done) begin
          if (child_last) begin
            st <= N_IDLE;
          end else begin
            cidx <= cidx + 1'b1;
            kick <= 1'b1;
          end
        end
        default: st <= N_IDLE;
      endcase
    end
  end

  // A new transaction is opened only on an idle subtree.
  start_only_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    parent_dn.start |-> (st == N_IDLE));

  initial begin
    assert (NLOCAL >= 1) else $error("cpc_node: NLOCAL must be at least 1");
  end

endmodule
