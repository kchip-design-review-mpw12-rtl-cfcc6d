// sram_bist: built-in self test of the Data FIFO SRAMs.
//
// On a start pulse it takes over the raw SRAM ports of all NMEM memories at once (the same
// addresses and data go to every memory) and runs, one operation per clock, the tests the
// description names:
//   all-0s / all-1s   up(w0) up(r0) up(w1) up(r1)
//   checkerboard      up(wC) up(rC) up(w~C) up(r~C)   C alternates 0101.. / 1010.. by address
//   marching-1s       up(w0) up(r0,w1,r1)             a 1 marches up through a 0 background
//   marching-0s       down(r1,w0,r0)                  a 0 marches down through a 1 background
// Each read is compared one clock later, when the word arrives, with the expected value; a
// mismatch sets that memory's bit in fail_mask. When all is done, done goes high (and stays
// until the next start) and busy drops. For DEPTH words the test takes 15*DEPTH clocks plus a
// few. The choice of tests follows the description; their order, the element sequence and
// the checkerboard pattern are this design's.
module sram_bist #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 18,
  parameter int unsigned NMEM  = 4,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic            fail,
  output logic [NMEM-1:0] fail_mask,
  // memory access, shared by all memories
  output logic            mem_en,
  output logic            mem_we,
  output logic            mem_re,
  output logic [AW-1:0]   mem_addr,
  output logic [W-1:0]    mem_wd,
  input  logic [W-1:0]    mem_rd [NMEM]
);

  localparam int unsigned NELEM = 11;

  // data kinds of an operation
  typedef enum logic [1:0] {D_ZERO, D_ONE, D_CHK, D_NCHK} dkind_e;

  typedef struct packed {
    logic       down;    // address order
    logic [1:0] nops;    // operations per address minus one
    logic [2:0] is_rd;   // op i is a read
    dkind_e     k0, k1, k2;
  } elem_t;

  function automatic elem_t elem(input int unsigned e);
    case (e)
      0:  return '{1'b0, 2'd0, 3'b000, D_ZERO, D_ZERO, D_ZERO};
      1:  return '{1'b0, 2'd0, 3'b001, D_ZERO, D_ZERO, D_ZERO};
      2:  return '{1'b0, 2'd0, 3'b000, D_ONE,  D_ONE,  D_ONE };
      3:  return '{1'b0, 2'd0, 3'b001, D_ONE,  D_ONE,  D_ONE };
      4:  return '{1'b0, 2'd0, 3'b000, D_CHK,  D_CHK,  D_CHK };
      5:  return '{1'b0, 2'd0, 3'b001, D_CHK,  D_CHK,  D_CHK };
      6:  return '{1'b0, 2'd0, 3'b000, D_NCHK, D_NCHK, D_NCHK};
      7:  return '{1'b0, 2'd0, 3'b001, D_NCHK, D_NCHK, D_NCHK};
      8:  return '{1'b0, 2'd0, 3'b000, D_ZERO, D_ZERO, D_ZERO};
      9:  return '{1'b0, 2'd2, 3'b101, D_ZERO, D_ONE,  D_ONE };
      default: return '{1'b1, 2'd2, 3'b101, D_ONE, D_ZERO, D_ZERO};
    endcase
  endfunction

  function automatic logic [W-1:0] pattern(input dkind_e k, input logic [AW-1:0] a);
    logic [W-1:0] c;
    for (int i = 0; i < W; i++) c[i] = (i % 2 == 1);
    if (a[0]) c = ~c;
    case (k)
      D_ZERO:  return '0;
      D_ONE:   return '1;
      D_CHK:   return c;
      default: return ~c;
    endcase
  endfunction

  logic [3:0]    e;
  logic [1:0]    op;
  logic [AW-1:0] addr;
  elem_t         cur;
  dkind_e        k;
  logic          rd_op;
  logic          chk_q;
  logic [W-1:0]  exp_q;

  assign cur   = elem(32'(e));
  assign k     = (op == 2'd0) ? cur.k0 : (op == 2'd1) ? cur.k1 : cur.k2;
  assign rd_op = cur.is_rd[op];

  assign mem_en   = busy;
  assign mem_we   = busy && !rd_op;
  assign mem_re   = busy && rd_op;
  assign mem_addr = addr;
  assign mem_wd   = pattern(k, addr);
  assign fail     = |fail_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      fail_mask <= '0;
      e         <= '0;
      op        <= '0;
      addr      <= '0;
      chk_q     <= 1'b0;
      exp_q     <= '0;
    end else begin
      // compare the word read in the previous clock
      chk_q <= busy && rd_op;
      exp_q <= pattern(k, addr);
      if (chk_q)
        for (int m = 0; m < NMEM; m++)
          if (mem_rd[m] != exp_q) fail_mask[m] <= 1'b1;

      if (start && !busy) begin
        busy      <= 1'b1;
        done      <= 1'b0;
        fail_mask <= '0;
        e         <= '0;
        op        <= '0;
        addr      <= '0;
      end else if (busy) begin
        if (op != cur.nops) begin
          op <= op + 1'b1;
        end else begin
          op <= '0;
          if ((!cur.down && addr == AW'(DEPTH-1)) || (cur.down && addr == '0)) begin
            if (e == 4'(NELEM-1)) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              e    <= e + 1'b1;
              addr <= elem(32'(e) + 1).down ? AW'(DEPTH-1) : '0;
            end
          end else begin
            addr <= cur.down ? addr - 1'b1 : addr + 1'b1;
          end
        end
      end
    end
  end

endmodule
