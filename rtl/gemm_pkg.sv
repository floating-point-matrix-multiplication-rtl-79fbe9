// gemm_pkg: types and constants shared by the blocked double-precision matrix
// multiplier (GEMM core, its controller and the processing elements).
//
// The PE array is driven by one command word that travels from PE to PE with
// one register per PE. A command can carry, in the same cycle, one write to an
// A buffer, one write to a C buffer (load unit), one multiply-add issue (exec
// unit) and one read of a C buffer (store unit). Field widths are fixed upper
// bounds (up to 256 PEs, 64 Ki words of C buffer per PE, 256 A rows per PE) so
// that the types can live in a package; unused high bits are constant zero.
package gemm_pkg;

  localparam int unsigned DW      = 64;   // IEEE-754 double
  localparam int unsigned AW      = 32;   // system memory word address
  localparam int unsigned PE_W    = 8;    // PE index
  localparam int unsigned LA_W    = 16;   // C-buffer local address
  localparam int unsigned Q_W     = 8;    // A-buffer row index (row of A' inside a PE)
  localparam int unsigned DIM_W   = 32;   // matrix dimensions m, n, k and leading dims
  localparam int unsigned META_W  = 32;   // read tag carried by the memory multiplexer

  // MAC pipeline: 4 multiplier stages + 7 adder stages = 11 cycles
  localparam int unsigned MUL_STAGES = 4;
  localparam int unsigned ADD_STAGES = 7;
  localparam int unsigned MAC_LAT    = MUL_STAGES + ADD_STAGES;

  typedef logic [DW-1:0] f64_t;

  // Command word passed down the linear PE array.
  typedef struct packed {
    // write into A buffer (data = wdata)
    logic              a_we;
    logic [PE_W-1:0]   a_pe;
    logic              a_bank;
    logic [Q_W-1:0]    a_q;
    // write into C buffer (data = wdata, or zero when c_zero)
    logic              c_we;
    logic              c_zero;
    logic [PE_W-1:0]   c_pe;
    logic              c_bank;
    logic [LA_W-1:0]   c_addr;
    logic [DW-1:0]     wdata;
    // multiply-add issue, broadcast to every PE: C[cbank][caddr] += A[abank][q] * b
    logic              mac_v;
    logic              mac_abank;
    logic [Q_W-1:0]    mac_q;
    logic              mac_cbank;
    logic [LA_W-1:0]   mac_caddr;
    logic [DW-1:0]     b;
    // read of C buffer for the store unit, answered on the read-data chain
    logic              r_v;
    logic [PE_W-1:0]   r_pe;
    logic              r_bank;
    logic [LA_W-1:0]   r_addr;
  } pe_cmd_t;

  typedef struct packed {
    logic          v;
    logic [DW-1:0] data;
  } pe_rd_t;

  // Block descriptor produced by the block scheduler and handed
  // load unit -> exec unit -> store unit.
  typedef struct packed {
    logic [AW-1:0]    a_addr;   // address of A'(0,0)
    logic [AW-1:0]    b_addr;   // address of B'(0,0)
    logic [AW-1:0]    c_addr;   // address of C'(0,0)
    logic [DIM_W-1:0] rows;     // rows of C' (<= SI)
    logic [DIM_W-1:0] cols;     // columns of C' (<= SJ)
    logic [Q_W-1:0]   ieff;     // rows held per PE = ceil(rows / NUM_PE)
    logic             bank;     // C buffer set used by this block
    logic             last;     // last block of the operation
  } blk_desc_t;

  // GEMM call parameters (Fig. 1 register file, alpha/beta reduced to flags)
  typedef struct packed {
    logic [AW-1:0]    a, b, c;
    logic [DIM_W-1:0] lda, ldb, ldc;
    logic [DIM_W-1:0] m, n, k;
    logic             alpha_neg;   // alpha = -1
    logic             beta_zero;   // beta = 0
  } gemm_params_t;

  // Tags carried by the memory multiplexer with each read
  typedef enum logic [1:0] {SRC_NONE = 2'd0, SRC_EXEC = 2'd1, SRC_LOAD = 2'd2} mem_src_e;

  typedef struct packed {
    logic [META_W-1-1-PE_W-Q_W-1-1:0] pad;
    logic            is_b;     // B element (goes to the B stream), else A element
    logic [PE_W-1:0] pe;
    logic [Q_W-1:0]  q;
    logic            bank;
    logic            col_last; // last element of an A column
  } exec_tag_t;

  typedef struct packed {
    logic [META_W-1-PE_W-LA_W-1-1:0] pad;
    logic [PE_W-1:0] pe;
    logic [LA_W-1:0] addr;
    logic            bank;
    logic            last;     // last element of the block
  } load_tag_t;

endpackage
