// tb_alu: self-checking test of the ALU.
// Every operation with edge-case and random operands, compared with results
// computed here from the operation's definition; also checks the zero output.
module tb_alu;
  import risc_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e    op;
  logic [7:0] a, b, y, want;
  logic       zero;

  alu dut (.op(op), .a(a), .b(b), .y(y), .zero(zero));

  function automatic logic [7:0] ref_op(alu_op_e o, logic [7:0] x, logic [7:0] z);
    int unsigned ux = x, uz = z;
    case (o)
      ALU_ADD:   return 8'((ux + uz) % 256);
      ALU_SUB:   return 8'((ux + 256 - uz) % 256);
      ALU_AND:   return x & z;
      ALU_OR:    return x | z;
      ALU_XOR:   return x ^ z;
      ALU_NAND:  return 8'hff ^ (x & z);
      ALU_NOR:   return 8'hff ^ (x | z);
      ALU_NOT:   return 8'hff ^ x;
      ALU_INC:   return 8'((ux + 1) % 256);
      ALU_DEC:   return 8'((ux + 255) % 256);
      ALU_PASSA: return x;
      ALU_PASSB: return z;
      default:   return x;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] edges [6] = '{8'h00, 8'h01, 8'h7f, 8'h80, 8'hfe, 8'hff};
    for (int o = 0; o <= int'(ALU_PASSB); o++) begin
      for (int i = 0; i < 36 + 200; i++) begin
        op = alu_op_e'(o);
        if (i < 36) begin a = edges[i / 6]; b = edges[i % 6]; end
        else begin a = 8'($urandom); b = 8'($urandom); end
        #1;
        want = ref_op(op, a, b);
        checks++;
        if (y !== want || zero !== (want == 0)) begin
          failures++;
          $display("FAIL op=%s a=%h b=%h got %h/%b want %h", op.name(), a, b, y, zero, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
