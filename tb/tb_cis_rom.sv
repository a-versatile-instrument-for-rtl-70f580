// tb_cis_rom: walks the tuple chain of cis_rom as a PC Card host would:
// each tuple is {code, link, body}; the walk must see DEVICE, VERS_1,
// FUNCID and END in that order, the VERS_1 body must hold version 4.1 and
// the product name, and everything past END must read FFh.
module tb_cis_rom;
  localparam int AW = 6;
  logic [AW-1:0] addr;
  logic [7:0] data;
  int checks = 0, failures = 0;

  cis_rom #(.AW(AW)) dut (.addr, .data);


  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic read(int i, output logic [7:0] v);
    addr = AW'(i); #1; v = data;
  endtask

  int p;
  logic [7:0] code, link, v;
  byte codes[$];
  string name;

  initial begin
    p = 0;
    code = 8'h00;
    for (int t = 0; t < 10 && code != 8'hFF; t++) begin
      read(p, code);
      codes.push_back(code);
      if (code != 8'hFF) begin
      read(p + 1, link);
      if (code == 8'h15) begin
        read(p + 2, v); check(v == 8'h04, "VERS_1 major");
        read(p + 3, v); check(v == 8'h01, "VERS_1 minor");
        name = "";
        for (int i = p + 4; i < p + 2 + int'(link); i++) begin
          read(i, v);
          if (v != 8'h00 && name.len() < 40) name = {name, string'(v)};
          else i = 1000;
        end
        check(name == "SD ANALYZER", "product name");
        read(p + 1 + int'(link), v); check(v == 8'hFF, "VERS_1 string list end");
      end
      if (code == 8'h21) begin
        read(p + 2, v); check(v == 8'hFF, "FUNCID function code");
      end
      p = p + 2 + int'(link);
      end
    end
    check(codes.size() == 4, "four tuples");
    check(codes[0] == 8'h01 && codes[1] == 8'h15 && codes[2] == 8'h21 && codes[3] == 8'hFF,
          "tuple order DEVICE, VERS_1, FUNCID, END");
    check(p == 26, $sformatf("END at byte 26 (%0d)", p));
    for (int j = p + 1; j < 2 ** AW; j++) begin
      read(j, v); check(v == 8'hFF, $sformatf("blank after END at %0d: %h", j, v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
