// Shared Memory (SMEM) with atomic operations.
// A Wishbone slave holding SIZE_BYTES of 32-bit words, shared by all CPUs and
// the host. Address bits [18:16] select the operation applied to the word at
// bits [15:2]:
//   0 direct     read, or write with byte selects
//   1 add        write: mem += data
//   2 test&set   read: returns the old value and writes 1
//   3 subtract   write: mem -= data
//   4 bit set    write: mem |= data
//   5 bit clear  write: mem &= ~data
//   6 bit flip   write: mem ^= data
// Reads with the other codes return the word unchanged. Each access is a
// read-modify-write done inside the slave in two cycles (read, then write
// and ack), and the slave serves one access at a time, so every operation is
// atomic with respect to all masters. The operation set and the selection by
// high address bits follow the document, which places add at +0x1_0000 and
// test-and-set at +0x2_0000; the codes of the other four are this design's.
module mt_smem
  import mt_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384
) (
  input  logic    clk_i,
  input  logic    rst_n_i,
  input  wb_m2s_t wb_i,
  output wb_s2m_t wb_o
);
  localparam int unsigned WORDS = SIZE_BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [31:0] rd_q, wdata_q, new_val;
  logic [AW-1:0] addr_q;
  smem_op_e    op_q;
  logic        we_q, exec, ack_q;
  logic [3:0]  sel_q;
  logic        do_write;

  always_comb begin
    do_write = 1'b1;
    new_val  = rd_q;
    unique case (op_q)
      SMEM_DIRECT: begin
        do_write = we_q;
        for (int i = 0; i < 4; i++) if (sel_q[i]) new_val[8*i +: 8] = wdata_q[8*i +: 8];
      end
      SMEM_ADD:    begin do_write = we_q; new_val = rd_q + wdata_q;  end
      SMEM_TSET:   begin do_write = !we_q; new_val = 32'd1;           end
      SMEM_SUB:    begin do_write = we_q; new_val = rd_q - wdata_q;  end
      SMEM_SET:    begin do_write = we_q; new_val = rd_q | wdata_q;  end
      SMEM_CLEAR:  begin do_write = we_q; new_val = rd_q & ~wdata_q; end
      SMEM_FLIP:   begin do_write = we_q; new_val = rd_q ^ wdata_q;  end
      default:     do_write = 1'b0;
    endcase
  end

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      exec  <= 1'b0;
      ack_q <= 1'b0;
    end else begin
      ack_q <= 1'b0;
      if (exec) begin
        exec  <= 1'b0;
        ack_q <= 1'b1;
        if (do_write) mem[addr_q] <= new_val;
      end else if (wb_i.cyc && wb_i.stb && !ack_q) begin
        exec    <= 1'b1;
        addr_q  <= wb_i.adr[AW+1:2];
        op_q    <= smem_op_e'(wb_i.adr[18:16]);
        we_q    <= wb_i.we;
        sel_q   <= wb_i.sel;
        wdata_q <= wb_i.dat;
      end
    end
  end

  // registered read of the addressed word (read half of the read-modify-write)
  logic [31:0] ret_q;
  always_ff @(posedge clk_i) begin
    rd_q <= mem[wb_i.adr[AW+1:2]];
    if (exec) ret_q <= rd_q;
  end

  assign wb_o.ack = ack_q;
  assign wb_o.dat = ret_q;
endmodule
