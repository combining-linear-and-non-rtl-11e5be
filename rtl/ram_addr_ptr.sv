// ram_addr_ptr: the RAM address pointer of the rectangular decoder.
//
// Two registers: ptr, the address of the next rectangle's control word, and
// cl_start, the address of the first rectangle of the current cluster. The
// controller issues one operation per cycle (rect_pkg::ptr_op_e); raddr is the
// address read in that cycle, and ptr moves to raddr + 1 whenever a word is read:
//   PTR_NEXT     read ptr                   (next rectangle of the cube)
//   PTR_RESTART  read cl_start              (cube of the same cluster: back to its first rectangle)
//   PTR_NEWCL    read ptr, cl_start <= ptr  (preloaded RAM: the next cluster starts after the last one)
//   PTR_FIRST    read 0,   cl_start <= 0    (cluster just loaded incrementally from word 0)
//   PTR_CLEAR    both pointers to 0, nothing read (start of the session)
// Restart and advance follow the decoder's description; the single-cycle,
// read-address-ahead encoding of the operations is this design's choice.
// Asynchronous active-low reset to 0.
module ram_addr_ptr
  import rect_pkg::*;
#(
  parameter int unsigned DEPTH = rect_pkg::DEPTH_D,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ptr_op_e       op,
  output logic [AW-1:0] raddr,
  output logic [AW-1:0] ptr,
  output logic [AW-1:0] cl_start
);

  always_comb begin
    unique case (op)
      PTR_RESTART: raddr = cl_start;
      PTR_FIRST:   raddr = '0;
      default:     raddr = ptr;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr      <= '0;
      cl_start <= '0;
    end else begin
      unique case (op)
        PTR_CLEAR: begin
          ptr      <= '0;
          cl_start <= '0;
        end
        PTR_NEXT, PTR_RESTART: ptr <= raddr + 1'b1;
        PTR_NEWCL: begin
          cl_start <= ptr;
          ptr      <= ptr + 1'b1;
        end
        PTR_FIRST: begin
          cl_start <= '0;
          ptr      <= AW'(1);
        end
        default: ;
      endcase
    end
  end

endmodule
