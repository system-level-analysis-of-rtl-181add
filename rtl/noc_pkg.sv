// noc_pkg: types and constants shared by the network interface (NI), the
// routers and the mesh of the hierarchical MPSoC.
//
// A flit is a control header plus 64 bits of payload. The header carries the
// destination cluster's X/Y mesh coordinate and a flow ID (the receive-channel
// number, unique within the receiving NI). The 64-bit payload, the per-flit
// header and the flow ID follow the document; the remaining header fields
// (flit kind, last flag, word offset) and all field widths are this design's
// choice. With 2+2 coordinate bits, 17 further bits and an N-bit flow ID the
// header is 21+N bits: 24 bits for 8 channels and 31 bits for 1024 channels,
// the two sizes the document quotes for a 4x4 mesh.
//
// The cluster side of the NI speaks AXI4 with a 64-bit data bus. The AXI
// channels are bundled into one request and one response struct per port.
package noc_pkg;

  // ---------------------------------------------------------------- flits
  localparam int unsigned COORD_W   = 2;    // mesh coordinate width (up to 4x4)
  localparam int unsigned FLOW_ID_W = 8;    // 256 receive channels per NI
  localparam int unsigned OFFSET_W  = 15;   // 64-bit word offset inside a buffer
  localparam int unsigned DATA_W    = 64;   // flit payload

  typedef enum logic {
    FLIT_DATA = 1'b0,   // payload is buffer data, written at base + 8*offset
    FLIT_SYNC = 1'b1    // no data: only sets the channel's mutex
  } flit_kind_e;

  typedef struct packed {
    logic [COORD_W-1:0]   dst_x;
    logic [COORD_W-1:0]   dst_y;
    logic [FLOW_ID_W-1:0] flow_id;
    flit_kind_e           kind;
    logic                 last;      // last flit of a buffer (packet)
    logic [OFFSET_W-1:0]  offset;    // word index of this flit in the buffer
  } flit_hdr_t;

  localparam int unsigned HDR_W = $bits(flit_hdr_t);

  typedef struct packed {
    flit_hdr_t           hdr;
    logic [DATA_W-1:0]   data;
  } flit_t;

  // Router port numbering
  localparam int unsigned NPORTS = 5;
  localparam int unsigned P_LOCAL = 0;
  localparam int unsigned P_NORTH = 1;   // towards y+1
  localparam int unsigned P_EAST  = 2;   // towards x+1
  localparam int unsigned P_SOUTH = 3;   // towards y-1
  localparam int unsigned P_WEST  = 4;   // towards x-1

  // ---------------------------------------------------------------- AXI4
  localparam int unsigned AXI_ADDR_W = 32;
  localparam int unsigned AXI_DATA_W = 64;
  localparam int unsigned AXI_ID_W   = 4;
  localparam int unsigned AXI_STRB_W = AXI_DATA_W / 8;

  typedef logic [AXI_ADDR_W-1:0] addr_t;
  typedef logic [AXI_DATA_W-1:0] data_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    addr_t               addr;
    logic [7:0]          len;     // beats - 1
    logic [2:0]          size;    // log2(bytes per beat)
    logic [1:0]          burst;   // 2'b01 = INCR
  } axi_ax_t;

  typedef struct packed {
    data_t                 data;
    logic [AXI_STRB_W-1:0] strb;
    logic                  last;
  } axi_w_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    logic [1:0]          resp;
  } axi_b_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    data_t               data;
    logic [1:0]          resp;
    logic                last;
  } axi_r_t;

  // Everything the master drives
  typedef struct packed {
    axi_ax_t aw;
    logic    aw_valid;
    axi_w_t  w;
    logic    w_valid;
    logic    b_ready;
    axi_ax_t ar;
    logic    ar_valid;
    logic    r_ready;
  } axi_req_t;

  // Everything the slave drives
  typedef struct packed {
    logic    aw_ready;
    logic    w_ready;
    axi_b_t  b;
    logic    b_valid;
    logic    ar_ready;
    axi_r_t  r;
    logic    r_valid;
  } axi_rsp_t;

  localparam logic [2:0] AXI_SIZE_8B = 3'd3;
  localparam logic [1:0] AXI_INCR    = 2'b01;
  localparam logic [1:0] AXI_OKAY    = 2'b00;
  localparam logic [1:0] AXI_SLVERR  = 2'b10;

  // ------------------------------------------------------- NI definitions
  // Register map of the NI slave port (byte offsets inside the NI window)
  localparam logic [15:0] NI_REG_SEND   = 16'h0000; // W: push send request (pointer)
  localparam logic [15:0] NI_REG_STATUS = 16'h0008; // R: status word
  localparam int unsigned NI_LUT_SEL_BIT = 15;      // addr[15]=1: LUT entry addr[14:3]

  // Channel descriptor read by Send Control at the pointer of a send request
  // word 0: [31:0] buffer pointer, [47:32] length in 64-bit words
  // word 1: [7:0] dst x, [15:8] dst y, [31:16] flow ID, [63:32] local mutex pointer
  typedef struct packed {
    logic [15:0] rsvd;
    logic [15:0] len_words;
    addr_t       buf_ptr;
  } desc_w0_t;

  typedef struct packed {
    addr_t       mutex_ptr;
    logic [15:0] flow_id;
    logic [7:0]  dst_y;
    logic [7:0]  dst_x;
  } desc_w1_t;

  // Receive look-up-table entry: where a flow's data and mutex live
  typedef struct packed {
    addr_t mutex_ptr;
    addr_t data_base;
  } lut_entry_t;

  // Write request from Send / Recv Control to Master Control
  typedef struct packed {
    addr_t addr;
    data_t data;
    logic  fence;   // issue only after all earlier writes are acknowledged
  } wr_req_t;

  localparam data_t MUTEX_SET = 64'd1;

endpackage
