// rb_pkg: types and constants shared by the reuse buffers (schemes Sv, Sn and
// Sn+d), the register source table and the top level.
//
// The machine around the reuse buffer is a MIPS-I style core: 32-bit words,
// 32-bit program counter and 67 architectural registers (32 integer, hi, lo,
// 32 floating point and the fcc flag), which gives a 7-bit register name.
// Decode, result-write and commit requests are plain packed structs so that
// every scheme sees the same bundle; the entry handle that comes with them is
// passed beside the struct because its width depends on the buffer size.
// pc_tag drops the two low PC bits, which are always zero for word-aligned
// instructions; lint reports them as unused, and that is intended.
package rb_pkg;

  localparam int unsigned XLEN      = 32;
  localparam int unsigned PC_W      = 32;
  localparam int unsigned NUM_AREGS = 67;   // 32 int + hi + lo + 32 fp + fcc
  localparam int unsigned AREG_W    = 7;
  localparam int unsigned TAG_W     = PC_W - 2;  // word-aligned instructions

  localparam int unsigned MAX_CKPTS = 8;    // unresolved branches in flight
  localparam int unsigned CKPT_W    = 3;

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [AREG_W-1:0] areg_t;
  typedef logic [TAG_W-1:0]  tag_t;

  // What part of an instruction the buffer may give back.
  //   K_ALU   : integer and control instructions, the whole result is reused
  //   K_LOAD  : address calculation, and the loaded value when memvalid is set
  //   K_STORE : address calculation only, the memory write is never reused
  typedef enum logic [1:0] {
    K_ALU   = 2'd0,
    K_LOAD  = 2'd1,
    K_STORE = 2'd2
  } kind_e;

  // One instruction presented to the reuse test at decode.
  typedef struct packed {
    logic             valid;
    logic [PC_W-1:0]  pc;
    kind_e            kind;
    logic [1:0]       src_used;      // operand j is a register operand (for a
                                     // store: address operands only)
    areg_t [1:0]      src;           // operand register names
    word_t [1:0]      src_val;       // operand values (scheme Sv only)
    logic [1:0]       src_known;     // operand value available at decode (Sv)
    logic [1:0]       src_inflight;  // latest producer not yet committed
    logic             st_pending;    // an older store has not committed yet
    logic             has_dest;
    areg_t            dest;
    logic             ckpt;          // take an RST checkpoint after this slot
    logic [CKPT_W-1:0] ckpt_id;
  } lookup_req_t;

  // Outcome of an executed instruction, written into its reserved entry.
  typedef struct packed {
    logic        valid;
    kind_e       kind;
    logic        fwd;         // load value forwarded from an uncommitted store
    word_t       result;      // ALU result or loaded value
    word_t       address;     // effective address for loads and stores
    word_t [1:0] src_val;     // operand values it executed with (Sv)
  } write_req_t;

  // An instruction leaving the machine in program order.
  typedef struct packed {
    logic  valid;
    logic  is_store;
    word_t st_addr;
    logic  has_dest;
    areg_t dest;
  } commit_req_t;

  function automatic tag_t pc_tag(input logic [PC_W-1:0] pc);
    return pc[PC_W-1:2];
  endfunction

endpackage
