// tb_program_rom: checks the program ROM image. The first words of the stored
// program (jump table and start of the set-up code), built here from the
// instruction encodings, must read back combinationally; the words past the
// program must be NOP, and a ROM built without a file must read all NOP.
module tb_program_rom;
  import vxc_pkg::*;
  int checks = 0, failures = 0;
  logic [10:0] addr;
  logic [15:0] data, data_e;

  program_rom u_rom (.addr, .data);
  program_rom #(.INIT_FILE("")) u_empty (.addr, .data(data_e));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] expw[10];
    expw[0] = {OP_JMP0, 9'd2};
    expw[1] = {OP_JMP0, 9'd32};
    expw[2] = instr(OP_SETSH, 12);
    expw[3] = instr(OP_SETDSH, 12);
    expw[4] = instr(OP_RPT, 4);
    expw[5] = instr(OP_SHIN, 'h108);
    expw[6] = instr(OP_STDC, 0);
    expw[7] = instr(OP_RPT, 4);
    expw[8] = instr(OP_SHIN, 'h10C);
    expw[9] = instr(OP_STDC, 1);
    for (int i = 0; i < 10; i++) begin
      addr = 11'(i);
      #1;
      check(data == expw[i], $sformatf("word %0d: %h exp %h", i, data, expw[i]));
    end
    for (int i = 100; i < 2048; i += 7) begin
      addr = 11'(i);
      #1;
      check(data == 16'h0000, $sformatf("word %0d not NOP", i));
      check(data_e == 16'h0000, "empty ROM");
    end
    addr = 11'd0;
    #1 check(data_e == 16'h0000, "empty ROM word 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
