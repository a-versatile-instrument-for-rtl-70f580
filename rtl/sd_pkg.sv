// sd_pkg: types, constants and CRC helpers shared by the interface-analyzer
// logic. The analyzer sits between a laptop (over a 16-bit PCMCIA bus) and an
// SD memory card. This package holds the register map seen from the PCMCIA
// side, the operation descriptor encodings, the timing-event codes that the
// counters/timers write into the timing FIFO, and the two SD CRCs:
// CRC7 (x^7 + x^3 + 1) over commands and responses, and CRC16-CCITT
// (x^16 + x^12 + x^5 + 1) over each data line of a data block.
// The register map, the encodings and the event codes are this design's own
// choices; the CRC polynomials are those of the SD physical layer.
package sd_pkg;

  // ---------------------------------------------------------------- registers
  // Common-memory word addresses (PCMCIA A[4:1]).
  localparam logic [3:0] REG_CTRL     = 4'h0;  // W: control / R: status
  localparam logic [3:0] REG_CLKDIV   = 4'h1;  // SD clock = clk / (2*(CLKDIV+1))
  localparam logic [3:0] REG_BLKLEN   = 4'h2;  // data block length in bytes
  localparam logic [3:0] REG_BLKCNT   = 4'h3;  // blocks per multiple-block command
  localparam logic [3:0] REG_OUTFIFO  = 4'h4;  // W: push to output FIFO / R: its level
  localparam logic [3:0] REG_INFIFO   = 4'h5;  // R: pop from input FIFO
  localparam logic [3:0] REG_TIMLO    = 4'h6;  // R: pop timing record, low half
  localparam logic [3:0] REG_TIMHI    = 4'h7;  // R: high half of the record popped last
  localparam logic [3:0] REG_INLVL    = 4'h8;  // R: input FIFO level
  localparam logic [3:0] REG_TIMLVL   = 4'h9;  // R: timing FIFO level
  localparam logic [3:0] REG_NCR      = 4'hA;  // response timeout in SD clocks
  localparam logic [3:0] REG_BLKDONE  = 4'hB;  // R: data blocks transferred
  localparam logic [3:0] REG_EVCNT    = 4'hC;  // R: timing events recorded

  // Control-word bits (write to REG_CTRL)
  localparam int CTRL_START   = 0;
  localparam int CTRL_RESP_LO = 1;  // [2:1] response type
  localparam int CTRL_DIR_LO  = 3;  // [4:3] data direction
  localparam int CTRL_WIDE    = 5;  // 1: 4-bit data bus, 0: DAT0 only
  localparam int CTRL_RAW     = 6;  // 1: input FIFO records raw line samples
  localparam int CTRL_CLKEN   = 7;  // SD clock running
  localparam int CTRL_CLEAR   = 8;  // clear sticky status flags and counters
  localparam int CTRL_ABORT   = 9;  // return the interface FSM to idle

  typedef enum logic [1:0] {
    RESP_NONE = 2'd0,  // no response expected
    RESP_48   = 2'd1,  // 48-bit response (R1, R3, R6, R7)
    RESP_136  = 2'd2,  // 136-bit response (R2)
    RESP_48B  = 2'd3   // 48-bit response followed by busy on DAT0 (R1b)
  } resp_type_e;

  typedef enum logic [1:0] {
    DIR_NONE  = 2'd0,
    DIR_READ  = 2'd1,  // multiple-block read, then stop command
    DIR_WRITE = 2'd2   // multiple-block write, then stop command
  } data_dir_e;

  // Operation descriptor latched from a control-word write.
  typedef struct packed {
    resp_type_e resp;
    data_dir_e  dir;
    logic       wide;
    logic       raw;
  } op_t;

  // Sticky status flags raised by the interface FSM.
  typedef struct packed {
    logic tim_overflow;   // timing record lost, timing FIFO full
    logic raw_overflow;   // raw sample lost, input FIFO full
    logic wr_crc_status;  // card's CRC status token was not "accepted"
    logic data_crc;       // read data block CRC16 mismatch
    logic resp_crc;       // 48-bit response CRC7 mismatch
    logic resp_timeout;   // no response start bit within NCR clocks
  } sticky_t;

  // ------------------------------------------------------------ timing events
  typedef enum logic [3:0] {
    EV_NONE         = 4'd0,
    EV_CMD_END      = 4'd1,  // last bit of a host command sent
    EV_RESP_START   = 4'd2,  // response start bit seen
    EV_RESP_END     = 4'd3,  // response end bit seen
    EV_DATA_START   = 4'd4,  // data block start bit (sent or seen)
    EV_DATA_END     = 4'd5,  // data block end bit (sent or seen)
    EV_BUSY_START   = 4'd6,  // card holds DAT0 low
    EV_BUSY_END     = 4'd7,  // card releases DAT0
    EV_RESP_TIMEOUT = 4'd8,  // no response
    EV_OP_DONE      = 4'd9   // operation finished
  } event_e;

  // Timing record: event code and the number of clock cycles since the
  // previous record.
  localparam int TIM_W   = 32;
  localparam int TICKS_W = TIM_W - 4;

  // -------------------------------------------------------------------- CRCs
  function automatic logic [6:0] crc7_step(logic [6:0] crc, logic b);
    logic fb;
    fb = b ^ crc[6];
    return {crc[5:0], 1'b0} ^ (fb ? 7'h09 : 7'h00);
  endfunction

  function automatic logic [15:0] crc16_step(logic [15:0] crc, logic b);
    logic fb;
    fb = b ^ crc[15];
    return {crc[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0000);
  endfunction

  // CRC7 of the first 40 bits of a command (start bit to end of argument).
  function automatic logic [6:0] crc7_40(logic [39:0] bits);
    logic [6:0] c;
    c = '0;
    for (int i = 39; i >= 0; i--) c = crc7_step(c, bits[i]);
    return c;
  endfunction

endpackage
