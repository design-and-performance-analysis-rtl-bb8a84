// vr_pkg: constants and types shared by the VR (virtual routing) ATM switch.
//
// The switch moves 53-byte ATM cells bit serially. One cell time slot is
// SLOT_BITS pclk periods; a cell occupies the first CELL_BITS of them (hclk
// high), the header being the first HDR_BITS. Every block decodes its work
// from the bit position k inside the slot, which the slot timer counts.
//
// Slot schedule (k = 0 .. 511), the numbers marked (own) are this design's:
//   0  .. 39   header bits arrive; the previous slot's connections send the
//              translated header of each outgoing cell
//   40         RS: header complete, cell sort runs
//   41         route table and traffic (UPC) lookups
//   42         HP: header processing done
//   VQ_START + i*N .. +N-1 (own: VQ_START = 48)
//              input port i owns the virtual-routing buses and sends one
//              (call number, buffer address, 12 header bits) PDU per
//              destination
//   VQ_END     valid_cell / destination count loaded into the buffer counter
//   40 .. 423  payload bits written into the chosen shift register buffer
//              and read out of the buffers connected in the previous slot
//   424        hclk falls; c_sig clears all connections
//   CONN_START + j (own: CONN_START = 432)
//              output port j sends the address at the head of its queue to
//              establish the connection for the next slot
package vr_pkg;

  localparam int unsigned SLOT_BITS  = 512;  // pclk periods per cell slot
  localparam int unsigned CELL_BITS  = 424;  // 53 octets
  localparam int unsigned HDR_BITS   = 40;   // 5 octets
  localparam int unsigned PAY_BITS   = CELL_BITS - HDR_BITS;  // 384
  localparam int unsigned KW         = $clog2(SLOT_BITS);

  localparam int unsigned K_RS       = HDR_BITS;       // 40
  localparam int unsigned K_LOOKUP   = HDR_BITS + 1;   // 41
  localparam int unsigned K_HP       = HDR_BITS + 2;   // 42
  localparam int unsigned VQ_START   = 48;
  localparam int unsigned K_CSIG     = CELL_BITS;      // 424
  localparam int unsigned CONN_START = 432;

  localparam int unsigned CALL_W     = 4;   // call number width (table entry)
  localparam int unsigned HEAD28_W   = 28;  // GFC/VPI/VCI
  localparam int unsigned KEEP_W     = 12;  // PT, CLP, HEC: header bits kept

  // Header field positions inside the 40-bit header register (first bit
  // received is bit 39).
  localparam int unsigned H_GFC_LSB  = 36;
  localparam int unsigned H_VPI_LSB  = 28;
  localparam int unsigned H_VCI_LSB  = 12;
  localparam int unsigned H_PT_LSB   = 9;
  localparam int unsigned H_CLP      = 8;

  typedef enum logic [1:0] {
    CELL_UNASSIGNED = 2'd0,
    CELL_SIGNALLING = 2'd1,
    CELL_OAM        = 2'd2,
    CELL_USER       = 2'd3
  } cell_type_e;

  // What became of a cell that arrived at an input port (reported once per
  // slot, at k = VQ_END).
  typedef enum logic [2:0] {
    FATE_NONE        = 3'd0,  // nothing reported this cycle
    FATE_ROUTED      = 3'd1,  // stored and queued at >= 1 output
    FATE_UNASSIGNED  = 3'd2,  // unassigned cell, dropped
    FATE_TABLE_MISS  = 3'd3,  // no route table match, dropped
    FATE_UPC_DISCARD = 3'd4,  // discarded by usage parameter control
    FATE_NO_BUFFER   = 3'd5,  // input buffers all full, lost
    FATE_QUEUE_FULL  = 3'd6,  // every destination queue full, lost
    FATE_CONTROL     = 3'd7   // signalling/OAM cell, handed to the port's
                              // CAC/management interface
  } fate_e;

  // Route table entry (Figure 5.7): incoming GFC/VPI/VCI and call number.
  typedef struct packed {
    logic                valid;
    logic [HEAD28_W-1:0] head;
    logic [CALL_W-1:0]   call;
  } rt_entry_t;

  // Traffic contract of one connection for the usage parameter control.
  typedef struct packed {
    logic                valid;
    logic [HEAD28_W-1:0] head;
    logic [7:0]          period;  // slots per new token (0: one per slot)
    logic [7:0]          depth;   // bucket size in tokens
    logic                tag;     // 1: tag CLP=1 when nonconforming, 0: discard
  } upc_entry_t;

  // Output controller lookup entry: (input port, call number) -> new header.
  typedef struct packed {
    logic                valid;
    logic [7:0]          in_port;  // only the low log2(N) bits are compared
    logic [CALL_W-1:0]   call;
    logic [1:0]          cls;      // service class queue
    logic [HEAD28_W-1:0] new_head;
  } oc_entry_t;

  function automatic int unsigned clog2_min1(input int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

endpackage
