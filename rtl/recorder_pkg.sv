// recorder_pkg: types and constants shared by the random number recorder.
//
// The recorder takes a 1 Gb/s serial random bit stream that a transceiver has
// already turned into 16-bit words, stores a long continuous run of it in
// DDR3 and later sends it to a PC over Gigabit Ethernet. The widths below
// (16-bit transceiver words, 64-bit memory words, 8-bit MAC client bytes)
// are those of the original recorder. The command frame format (EtherType,
// opcode byte and codes) is this design's own choice: the original only says
// that a command decoder turns commands from the PC software into actions.
package recorder_pkg;

  // Datapath widths.
  localparam int unsigned GTX_W  = 16;  // transceiver parallel word
  localparam int unsigned MEM_W  = 64;  // DDR3 user-interface word
  localparam int unsigned BYTE_W = 8;   // MAC client byte

  typedef logic [47:0] mac_addr_t;

  localparam mac_addr_t BROADCAST_MAC = 48'hFFFF_FFFF_FFFF;

  // EtherType of both command frames (PC -> recorder) and data frames
  // (recorder -> PC): the IEEE local experimental EtherType 1.
  localparam logic [15:0] REC_ETHERTYPE = 16'h88B5;

  // Ethernet header length in bytes (destination, source, EtherType).
  localparam int unsigned ETH_HDR_BYTES = 14;

  // Opcode carried in the first payload byte of a command frame.
  typedef enum logic [7:0] {
    CMD_NONE   = 8'h00,
    CMD_RECORD = 8'h01,  // fill the DDR3 memory with a fresh run of data
    CMD_UPLOAD = 8'h02   // send the recorded run to the PC
  } cmd_e;

  // DDR3 user-interface command codes (as on the memory controller's
  // application interface).
  typedef enum logic [2:0] {
    MEM_WRITE = 3'b000,
    MEM_READ  = 3'b001
  } mem_cmd_e;

  // State of the cache controller, also reported as status.
  typedef enum logic [1:0] {
    CC_IDLE   = 2'd0,
    CC_RECORD = 2'd1,
    CC_UPLOAD = 2'd2
  } cc_state_e;

endpackage
