// arise_pkg: shared widths, encodings and types of the ARISE-extended
// embedded multiprocessor.
//
// The core processor (CP) uses a 32-bit, three-register instruction word of
// the kind found on MIPS-, ARM- or PowerPC-class embedded cores. One primary
// opcode is reserved for all ARISE instructions; the secondary field `sec`
// carries both the ARISE instruction (instr) and the ARISE operation code
// (opc), and the three register fields name the operands, exactly as for a
// CP instruction. The concrete bit positions, the reserved opcode value, the
// instr encodings and the layout of the ARISE configuration word are this
// design's own choices; the split into instr/opc/operands follows the
// ARISE instruction format.
//
//   [31:26] op  (ARISE_MAJOR for every ARISE instruction)
//   [25:21] rs  [20:16] rt  [15:11] rd
//   [10:8]  instr           [7:0] opc
package arise_pkg;

  localparam int unsigned XLEN     = 32;  // CP data / memory word width
  localparam int unsigned REG_W    = 5;   // register specifier width
  localparam int unsigned INSTR_W  = 3;   // ARISE instruction field
  localparam int unsigned OPC_W    = 8;   // ARISE operation code field (N = 256)
  localparam int unsigned ID_W     = 12;  // operation identifier (M = 4096 >= N)

  localparam logic [5:0] ARISE_MAJOR = 6'h1C;   // reserved primary opcode
  localparam logic [XLEN-1:0] CP_NOP = '0;      // bubble handed to the CP

  // ARISE instructions (the instr field)
  typedef enum logic [INSTR_W-1:0] {
    A_MOVTA = 3'd0,  // rs,rt values -> next two input-bank places
    A_MOVFA = 3'd1,  // next output-bank place -> rd
    A_EXEC  = 3'd2,  // execute operation opc on its CU
    A_CONF  = 3'd3,  // configure operation opc from bitstream [rs .. rt]
    A_SETID = 3'd4,  // assign opc -> Id held in rs
    A_RDST  = 3'd5,  // ARISE status register -> rd
    A_NOP6  = 3'd6,
    A_NOP7  = 3'd7
  } arise_instr_e;

  // ARISE instruction word handed from the fetch-stage decoder to PRE
  typedef struct packed {
    logic              valid;
    arise_instr_e      instr;
    logic [OPC_W-1:0]  opc;
    logic [REG_W-1:0]  rs;
    logic [REG_W-1:0]  rt;
    logic [REG_W-1:0]  rd;
  } arise_word_t;

  // Control signals generated at PRE for all ARISE components
  typedef struct packed {
    logic iob_wr;      // movta: write two operands into the input bank
    logic iob_rd;      // movfa: read one result from the output bank
    logic tbl_wr;      // setid: rewrite the Opcode-to-Id table
    logic exec;        // start an ARISE operation
    logic conf;        // configure an ARISE operation
    logic rd_status;   // read the ARISE status register
    logic wb;          // instruction writes the CP register file at POST
    logic need_idle;   // must wait until no ARISE operation is running
  } arise_ctrl_t;

  // First word of every bitstream: the ARISE configuration word that the
  // wrapper keeps in its table for the operation.
  //   [31] lat_known  [30] concurrent  [29] block_irq  [15:0] latency
  typedef struct packed {
    logic        lat_known;   // latency of the operation is given
    logic        concurrent;  // CP keeps running while the CU works
    logic        block_irq;   // interrupts to the CP are blocked while busy
    logic [12:0] reserved;
    logic [15:0] latency;     // cycles, used when lat_known
  } arise_cfg_t;

  // ARISE status register layout
  //   [27:16] Id of the last operation   [3] configured   [2] unknown Id
  //   [1] operation done                 [0] busy
  localparam int unsigned ST_BUSY = 0, ST_DONE = 1, ST_ERR = 2, ST_CONF = 3, ST_ID = 16;

endpackage
