// tb_adapto_lb: checks the logic block against the operation table.
//
// For each named operation (SUM and its carry, AND, OR, XOR, XNOR, 3-input
// XOR, majority, NOT, PASS) the block is driven with all 16 combinations of
// D1, D2, D3 and the incoming carry, and the output is compared with the
// Boolean function the operation names. The carry to the next LB must
// always be the full-adder carry of the inputs actually used.
module tb_adapto_lb;
  import adapto_pkg::*;

  logic d1, d2, d3, co, y, cout;
  lb_cfg_t cfg;
  int checks = 0, failures = 0;

  adapto_lb dut (.d1(d1), .d2(d2), .d3(d3), .co(co), .cfg(cfg), .y(y), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic maj(logic a, logic b, logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

  task automatic check_op(string name, lb_cfg_t c, int op);
    logic exp_y, exp_c;
    cfg = c;
    for (int v = 0; v < 16; v++) begin
      {d1, d2, d3, co} = 4'(v);
      #1;
      case (op)
        0: begin exp_y = d1 ^ d2 ^ co; exp_c = maj(d1, d2, co); end // SUM
        1: begin exp_y = maj(d1, d2, co); exp_c = exp_y;        end // carry
        2: begin exp_y = d1 & d2;  exp_c = d1 & d2;             end // AND
        3: begin exp_y = d1 | d2;  exp_c = d1 | d2;             end // OR
        4: begin exp_y = d1 ^ d2;  exp_c = d1 & d2;             end // XOR
        5: begin exp_y = ~(d1 ^ d2); exp_c = d1 | d2;           end // XNOR
        6: begin exp_y = d1 ^ d2 ^ d3; exp_c = maj(d1, d2, d3); end // XOR3
        7: begin exp_y = maj(d1, d2, d3); exp_c = exp_y;        end // MAJ
        8: begin exp_y = ~d1; exp_c = d1;                       end // NOT
        default: begin exp_y = d1; exp_c = 1'b0;               end // PASS
      endcase
      checks++;
      if (y !== exp_y || cout !== exp_c) begin
        failures++;
        $display("FAIL %s d1=%0b d2=%0b d3=%0b co=%0b: y=%0b (exp %0b) cout=%0b (exp %0b)",
                 name, d1, d2, d3, co, y, exp_y, cout, exp_c);
      end
    end
  endtask

  initial begin
    check_op("SUM",   LB_SUM,   0);
    check_op("CARRY", LB_CARRY, 1);
    check_op("AND",   LB_AND2,  2);
    check_op("OR",    LB_OR2,   3);
    check_op("XOR",   LB_XOR2,  4);
    check_op("XNOR",  LB_XNOR2, 5);
    check_op("XOR3",  LB_XOR3,  6);
    check_op("MAJ3",  LB_MAJ3,  7);
    check_op("NOT",   LB_NOT,   8);
    check_op("PASS",  LB_PASS,  9);
    // Raw Table rows, written as P S0 S1 S2 bit patterns.
    cfg = '{p: 1'b1, s0: 1'b0, s1: 1'b1, s2: 1'b1}; d1 = 1'b0; d2 = 1'b0; d3 = 1'b1; co = 1'b1; #1;
    checks++; if (y !== 1'b0) begin failures++; $display("FAIL OR row with zero inputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
