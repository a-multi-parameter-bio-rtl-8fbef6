// Shared constants and types for the bio-electric sensor ASIC.
//
// The 2-wire bus carries one command frame per transaction. The field widths
// follow the published frame: a 4-bit SE address, a 10-bit memory start
// address, a 10-bit memory stop address, a 4-bit broadcast command and a 3-bit
// acknowledge, 31 bits in all. The command codes, the acknowledge pattern and
// the address plan (0 = broadcast, 1..14 = sensing electrodes, 15 = unused)
// are this design's own choices.
package bio_pkg;

  localparam int unsigned ADDR_W    = 4;
  localparam int unsigned MEMADDR_W = 10;
  localparam int unsigned CMD_W     = 4;
  localparam int unsigned ACK_W     = 3;
  localparam int unsigned HDR_W     = ADDR_W + 2 * MEMADDR_W + CMD_W;  // 28 bits sent by the ME
  localparam int unsigned FRAME_W   = HDR_W + ACK_W;                   // 31 bits

  localparam int unsigned MAX_SE    = 14;   // up to 14 sensing electrodes
  localparam logic [ADDR_W-1:0] BCAST_ADDR = '0;

  // Pattern an addressed SE drives during the three acknowledge bit slots,
  // MSB first. A 0 pulls SDA low; the released (pulled-up) bus reads 3'b111.
  localparam logic [ACK_W-1:0] ACK_PATTERN = 3'b010;

  typedef enum logic [CMD_W-1:0] {
    CMD_IDLE       = 4'h0,  // scan probe: addressed SE only acknowledges
    CMD_SYN_SAMPLE = 4'h1,  // broadcast: restart acquisition in every SE
    CMD_SLEEP      = 4'h2,  // broadcast: put every SE in low-power sleep
    CMD_COLLECT    = 4'h3   // addressed SE streams memory[start..stop]
  } cmd_e;

  typedef struct packed {
    logic [ADDR_W-1:0]    addr;
    logic [MEMADDR_W-1:0] mem_start;
    logic [MEMADDR_W-1:0] mem_stop;
    cmd_e                 cmd;
  } cmd_frame_t;

endpackage
