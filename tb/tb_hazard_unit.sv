// tb_hazard_unit: self-checking test of the stall/flush control.
//
// Exhausts all 32 input combinations and compares the four outputs with the
// expected action: redirect from EX (flush IF/ID and ID/EX), syscall in ID
// (hold PC and IF/ID, flush ID/EX), branch or jr in ID (hold PC, flush
// IF/ID), jump in ID (flush IF/ID), otherwise run.
module tb_hazard_unit;
  logic ex_redirect, id_branch, id_jr, id_jump, id_halt;
  logic pc_we, if_id_we, if_id_rst, id_ex_rst;
  int checks = 0, failures = 0;

  hazard_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] e;
    for (int v = 0; v < 32; v++) begin
      {ex_redirect, id_branch, id_jr, id_jump, id_halt} = 5'(v);
      #1;
      //        pc_we if_id_we if_id_rst id_ex_rst
      if (ex_redirect)             e = 4'b1111;
      else if (id_halt)            e = 4'b0001;
      else if (id_branch || id_jr) e = 4'b0110;
      else if (id_jump)            e = 4'b1110;
      else                         e = 4'b1100;
      checks++;
      if ({pc_we, if_id_we, if_id_rst, id_ex_rst} !== e) begin
        failures++;
        $display("FAIL in=%05b got %04b exp %04b", v[4:0], {pc_we, if_id_we, if_id_rst, id_ex_rst}, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
