// tb_ram_addr_ptr: self-checking test of the RAM address pointer.
// Applies random sequences of pointer operations and compares raddr, ptr and
// cl_start with a reference model kept in the testbench.
module tb_ram_addr_ptr;
  import rect_pkg::*;
  localparam int unsigned DEPTH = 16, AW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  ptr_op_e op = PTR_HOLD;
  logic [AW-1:0] raddr, ptr, cl_start;
  logic [AW-1:0] m_ptr = '0, m_cs = '0, m_ra;
  int checks = 0, failures = 0;

  ram_addr_ptr #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ptr_op_e pick();
    case ($urandom_range(9))
      0:       return PTR_CLEAR;
      1, 2:    return PTR_RESTART;
      3:       return PTR_NEWCL;
      4:       return PTR_FIRST;
      5:       return PTR_HOLD;
      default: return PTR_NEXT;
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      op = pick();
      #1;
      case (op)
        PTR_RESTART: m_ra = m_cs;
        PTR_FIRST:   m_ra = '0;
        default:     m_ra = m_ptr;
      endcase
      checks++;
      if (raddr !== m_ra) begin
        failures++;
        $display("op %s: raddr %0d expected %0d", op.name(), raddr, m_ra);
      end
      @(posedge clk); #1;
      case (op)
        PTR_CLEAR:   begin m_ptr = '0; m_cs = '0; end
        PTR_NEXT:    m_ptr = m_ptr + 1'b1;
        PTR_RESTART: m_ptr = m_cs + 1'b1;
        PTR_NEWCL:   begin m_cs = m_ptr; m_ptr = m_ptr + 1'b1; end
        PTR_FIRST:   begin m_cs = '0; m_ptr = AW'(1); end
        default: ;
      endcase
      checks++;
      if (ptr !== m_ptr || cl_start !== m_cs) begin
        failures++;
        $display("after %s: ptr %0d/%0d cl_start %0d/%0d", op.name(), ptr, m_ptr, cl_start, m_cs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
