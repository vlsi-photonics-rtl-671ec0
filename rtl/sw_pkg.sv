// Shared constants and types of the optoelectronic Switch IC.
//
// The Switch IC connects four electrical ports (A..D) of a processor board to
// sixty-four 12-bit optical paths of a fixed-path optical ring. Every line runs
// at double data rate and is demultiplexed 1:2 on entry, so inside the chip a
// path or port carries a 24-bit word per internal clock cycle. The BUSY BIT
// arbitration channel carries 64 busy bits on 4 serial lines of 16 bits each,
// framed by one shared FRAME line.
//
// The sizes (64 paths, 4 ports, 12 bits, 4 BUSY BIT lines) are those of the
// specification; 16 bits per BUSY BIT line is this design's reading of it.
package sw_pkg;

  localparam int unsigned NPATH    = 64;  // optical input/output paths
  localparam int unsigned NPORT    = 4;   // electrical I/O ports A..D
  localparam int unsigned PW       = 12;  // bits per path/port: 8 data, FRAME, 2 parity, control
  localparam int unsigned BB_LANES = 4;   // serial BUSY BIT lines
  localparam int unsigned BB_BITS  = 16;  // busy bits serialised on each line

  // State of the FRAME logic (hide-incoming-frame machine).
  typedef enum logic [1:0] {
    FR_PASS   = 2'd0,  // FRAME_OUT mirrors FRAME_IN
    FR_INIT   = 2'd1,  // master forces FRAME_OUT low (HIF high)
    FR_CREATE = 2'd2   // master emits a new FRAME from its request register
  } frame_state_e;

endpackage
