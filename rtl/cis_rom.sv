// cis_rom: the PCMCIA Card Information Structure ROM. A PC Card host reads
// this tuple chain from attribute memory (REG# low) when the card is
// inserted, to identify the card and pick a driver. The ROM is a constant
// table of bytes, read asynchronously by byte index; PCMCIA places CIS bytes
// at even attribute addresses, so the control unit indexes it with A[N:1].
// The tuple contents are this design's choice, a minimal chain:
//   CISTPL_DEVICE (01h): no common-memory device info (type 0)
//   CISTPL_VERS_1 (15h): version 4.1 and the product name strings
//   CISTPL_FUNCID (21h): function code FFh (vendor specific)
//   CISTPL_END    (FFh)
// Bytes past the chain read as FFh.
module cis_rom #(
  parameter int AW = 6     // 2**AW bytes
) (
  input  logic [AW-1:0] addr,
  output logic [7:0]    data
);
  localparam int N = 2 ** AW;
  localparam int NAME_LEN = 11;
  localparam logic [8*NAME_LEN-1:0] NAME = "SD ANALYZER";

  function automatic logic [7:0] tuple_byte(int i);
    // byte layout of the chain, see the header
    int p;
    if (i == 0) return 8'h01;       // CISTPL_DEVICE
    if (i == 1) return 8'h03;       // link
    if (i == 2) return 8'h00;       // no device
    if (i == 3) return 8'h00;
    if (i == 4) return 8'hFF;       // end of device info
    if (i == 5) return 8'h15;       // CISTPL_VERS_1
    if (i == 6) return 8'(2 + NAME_LEN + 2); // link: version, name, 00, FF
    if (i == 7) return 8'h04;       // major version
    if (i == 8) return 8'h01;       // minor version
    p = i - 9;
    if (p < NAME_LEN) return NAME[8*(NAME_LEN-1-p) +: 8];
    if (p == NAME_LEN)     return 8'h00;  // end of string
    if (p == NAME_LEN + 1) return 8'hFF;  // end of strings
    p = p - NAME_LEN - 2;
    if (p == 0) return 8'h21;       // CISTPL_FUNCID
    if (p == 1) return 8'h02;       // link
    if (p == 2) return 8'hFF;       // function: vendor specific
    if (p == 3) return 8'h00;       // system init flags
    if (p == 4) return 8'hFF;       // CISTPL_END
    return 8'hFF;
  endfunction

  logic [7:0] rom [N];
  always_comb begin
    for (int i = 0; i < N; i++) rom[i] = tuple_byte(i);
  end

  assign data = rom[addr];
endmodule
