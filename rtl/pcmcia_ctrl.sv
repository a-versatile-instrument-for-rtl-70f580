// pcmcia_ctrl: the PCMCIA control unit. It lets the laptop reach the
// analyzer as a 16-bit PC Card memory: common memory (REG# high) holds the
// registers and the FIFO data ports, attribute memory (REG# low) holds the
// CIS ROM at even byte addresses. It also contains the read multiplexer that
// selects among the status/control registers, the input FIFO, the timing
// FIFO and the CIS ROM.
// The bus strobes are asynchronous to the system clock; they pass through
// two-flop synchronizers, and address and data are taken while the strobe
// is low (they are stable for the whole PC Card cycle).
//  - Write: acted on when WE# rises with CE1# low. Address REG_OUTFIFO
//    pushes the data word into the output FIFO; any other common-memory
//    address is a register write. Attribute-memory writes are ignored.
//  - Read: when OE# falls with CE1# low, the addressed word is registered
//    into the output latch three system clocks later, and the input FIFO or
//    timing FIFO is popped if that is what was read. A timing record is 32
//    bits: reading REG_TIMLO returns its low half and pops it, REG_TIMHI then
//    returns the high half of that record.
//  - The data pins are driven while CE1# and OE# are both low (d_oe).
// The host must allow at least 4 system-clock periods from OE# low to data
// (80 ns at 50 MHz). Word accesses only (CE2# is ignored); WAIT# is not
// used. The address map and the bus handling are this design's own.
module pcmcia_ctrl
  import sd_pkg::*;
#(
  parameter int CIS_AW = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  // PC Card pins
  input  logic        ce1_n,
  input  logic        oe_n,
  input  logic        we_n,
  input  logic        reg_n,
  input  logic [7:0]  a,
  input  logic [15:0] d_in,
  output logic [15:0] d_out,
  output logic        d_oe,
  // register file
  output logic        reg_wr,
  output logic [3:0]  reg_addr,
  output logic [15:0] reg_wdata,
  input  logic [15:0] reg_rdata,
  // output FIFO write side
  output logic        out_push,
  output logic [15:0] out_wdata,
  // input FIFO read side
  output logic        in_pop,
  input  logic [15:0] in_rdata,
  // timing FIFO read side
  output logic        tim_pop,
  input  logic [TIM_W-1:0] tim_rdata,
  // CIS ROM
  output logic [CIS_AW-1:0] cis_addr,
  input  logic [7:0]  cis_data
);
  logic [2:0] ce_s, oe_s, we_s;   // [0] newest synchronizer stage, [2] previous
  logic       reg_q;
  logic [7:0] a_q;
  logic [15:0] d_q;
  logic [15:0] tim_hi;

  logic rd_start, wr_end;
  assign rd_start = oe_s[2] && !oe_s[1] && !ce_s[1];   // OE# fell
  assign wr_end   = !we_s[2] && we_s[1];               // WE# rose

  assign d_oe      = !ce1_n && !oe_n;
  assign cis_addr  = a_q[CIS_AW:1];
  assign reg_addr  = a_q[4:1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ce_s      <= '1;
      oe_s      <= '1;
      we_s      <= '1;
      reg_q     <= 1'b1;
      a_q       <= '0;
      d_q       <= '0;
      tim_hi    <= '0;
      d_out     <= '0;
      reg_wr    <= 1'b0;
      reg_wdata <= '0;
      out_push  <= 1'b0;
      out_wdata <= '0;
      in_pop    <= 1'b0;
      tim_pop   <= 1'b0;
    end else begin
      ce_s <= {ce_s[1:0], ce1_n};
      oe_s <= {oe_s[1:0], oe_n};
      we_s <= {we_s[1:0], we_n};
      // address and data are stable while a strobe is low
      if (!oe_s[0] || !we_s[0]) begin
        a_q   <= a;
        d_q   <= d_in;
        reg_q <= reg_n;
      end
      reg_wr   <= 1'b0;
      out_push <= 1'b0;
      in_pop   <= 1'b0;
      tim_pop  <= 1'b0;

      if (wr_end && reg_q && !ce_s[2]) begin
        if (a_q[4:1] == REG_OUTFIFO) begin
          out_push  <= 1'b1;
          out_wdata <= d_q;
        end else begin
          reg_wr    <= 1'b1;
          reg_wdata <= d_q;
        end
      end

      if (rd_start) begin
        if (!reg_q) d_out <= {8'h00, cis_data};
        else begin
          case (a_q[4:1])
            REG_INFIFO: begin
              d_out  <= in_rdata;
              in_pop <= 1'b1;
            end
            REG_TIMLO: begin
              d_out   <= tim_rdata[15:0];
              tim_hi  <= tim_rdata[TIM_W-1:16];
              tim_pop <= 1'b1;
            end
            REG_TIMHI: d_out <= tim_hi;
            default:   d_out <= reg_rdata;
          endcase
        end
      end
    end
  end
endmodule
