// gc_pkg: types and constants shared by the garbled-circuit overlay.
//
// Every wire of the circuit carries a 128-bit label. A gate is described by a
// 128-bit (16-byte) descriptor: three 32-bit addresses (input 0, input 1,
// output) followed by a 32-bit control word. The control word carries a 2-bit
// memory-type prefix for each of the three addresses (00 HBM, 01 BRAM,
// 10 URAM, 11 network BRAM, as in the overlay's memory layout) and the index of
// the hardware gate the operation is assigned to. The exact bit positions inside
// the control word, and the valid and send flags, are this design's own choice.
// A batch is 16 descriptors: the first 8 address the garbled AND gates, the
// last 8 the free-XOR gates.
package gc_pkg;

  localparam int LABEL_W     = 128;
  localparam int ADDR_W      = 32;
  localparam int N_AND       = 8;            // garbled AND gates in the overlay
  localparam int N_XOR       = 8;            // free-XOR gates in the overlay
  localparam int BATCH_SLOTS = N_AND + N_XOR; // descriptors per batch
  localparam int ID_W        = 8;            // node / destination identifier width

  typedef logic [LABEL_W-1:0] label_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [ID_W-1:0]    node_id_t;

  // 2-bit address-type prefix.
  typedef enum logic [1:0] {
    MEM_HBM  = 2'b00,
    MEM_BRAM = 2'b01,
    MEM_URAM = 2'b10,
    MEM_NET  = 2'b11
  } mem_type_e;

  // Last 4 bytes of a descriptor.
  typedef struct packed {
    mem_type_e   in0_type;  // [31:30]
    mem_type_e   in1_type;  // [29:28]
    mem_type_e   out_type;  // [27:26]
    logic [20:0] rsvd;      // [25:5]
    logic        send;      // [4]   also transmit the output label to the peer FPGA
    logic        valid;     // [3]   slot holds an operation (0: empty slot)
    logic [2:0]  unit;      // [2:0] hardware gate the operation is assigned to
  } gate_ctrl_t;

  // One 16-byte gate descriptor; byte 0 is the most significant byte.
  typedef struct packed {
    addr_t      in0_addr;   // [127:96]
    addr_t      in1_addr;   // [95:64]
    addr_t      out_addr;   // [63:32]
    gate_ctrl_t ctrl;       // [31:0]
  } gate_desc_t;

  // Request to the label memories, routed by its type prefix.
  typedef struct packed {
    logic      we;
    mem_type_e mtype;
    addr_t     addr;
    label_t    wdata;
  } mem_req_t;

  // Request to off-chip HBM (128-bit word address).
  typedef struct packed {
    logic   we;
    addr_t  addr;
    label_t wdata;
  } hbm_req_t;

  // Packets exchanged with the peer FPGA through the UDP stack.
  typedef enum logic [1:0] {
    PKT_NONE  = 2'd0,
    PKT_HELLO = 2'd1,   // start-up handshake
    PKT_DATA  = 2'd2    // one 128-bit label
  } pkt_kind_e;

  typedef struct packed {
    node_id_t  dest;
    node_id_t  src;
    pkt_kind_e kind;
    label_t    data;
  } net_pkt_t;

endpackage
