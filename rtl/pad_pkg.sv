// pad_pkg: types and constants shared by the pixel-gang receiver.
//
// A pixel gang is a group of detector pixels whose one-bit outputs are sent
// one after another over a single pin. Each gang on the wire is announced by
// the two-bit trigger pattern "10" (a 1 followed by a 0) and carries 16 data
// bits. The gang length and the trigger pattern follow the source description.
// The state encoding is this design's choice.
package pad_pkg;

  // Data bits per pixel gang.
  localparam int unsigned GANG_BITS_DEFAULT = 16;

  // Trigger pattern: bit [1] is the earlier bit on the wire, bit [0] the later.
  localparam logic [1:0] TRIGGER_PATTERN = 2'b10;

  // Receiver states.
  typedef enum logic [1:0] {
    ST_IDLE       = 2'd0,  // just out of reset
    ST_WAITING    = 2'd1,  // looking for the trigger
    ST_RECEIVING  = 2'd2,  // shifting in the gang's data bits
    ST_DATA_VALID = 2'd3   // the stored word is on the output
  } state_t;

endpackage
