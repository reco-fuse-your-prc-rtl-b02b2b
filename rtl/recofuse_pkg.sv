// recofuse_pkg: shared constants and types of the ReCoFuse container.
//
// Holds the 7-series configuration packet words that the interface monitors
// look for in the bitfile stream, the index of each ReCoFuse slot, and the
// number of slots. The packet words are those of the public 7-series
// configuration format; which of them the monitors use is a choice of this
// design (the container only needs to see where a bitfile starts, where it
// ends and which frame address it writes).
package recofuse_pkg;

  // Configuration packet words (7-series bitstream format, not bit-swapped).
  localparam logic [31:0] SYNC_WORD     = 32'hAA99_5566;  // start of a bitfile body
  localparam logic [31:0] HDR_WRITE_FAR = 32'h3000_2001;  // type-1 write, 1 word, to FAR
  localparam logic [31:0] HDR_WRITE_CMD = 32'h3000_8001;  // type-1 write, 1 word, to CMD
  localparam logic [31:0] CMD_DESYNC    = 32'h0000_000D;  // CMD value ending the bitfile

  // ReCoFuse slots hosted by the container.
  typedef enum logic [0:0] {
    RCF_TIMEOUT = 1'b0,   // RCF0
    RCF_REPLAY  = 1'b1    // RCF1
  } rcf_slot_e;

  localparam int unsigned N_RCF = 2;

  // AXI4 read channel payloads between configuration memory and PRC
  // (32-bit data, single ID).
  typedef struct packed {
    logic [31:0] addr;
    logic [7:0]  len;
    logic [2:0]  size;
    logic [1:0]  burst;
  } axi_ar_t;

  typedef struct packed {
    logic [31:0] data;
    logic [1:0]  resp;
    logic        last;
  } axi_r_t;

  // PRC to ICAP write port.
  typedef struct packed {
    logic        csib;   // chip select, active low
    logic        rdwrb;  // 0 = write
    logic [31:0] data;
  } icap_wr_t;

endpackage
