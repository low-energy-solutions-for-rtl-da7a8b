// write_buffer: FIFO of pending cache-line writes in front of the encoding
// memory controller.
//
// Each entry holds a destination line address and a LINE_BITS-bit cache line.
// Both sides use valid/ready handshakes; an entry moves when valid and ready
// are both high on a rising edge. in_ready is low when all DEPTH entries are
// occupied; out_valid is high while at least one is. A write into a full
// buffer and a read from an empty one are impossible by construction (checked
// by assertions). Data leaves in arrival order; the head entry is driven from
// the storage array directly, so an entry written at edge t can leave at edge
// t+1. The depth is this design's choice.
module write_buffer #(
  parameter int unsigned LINE_BITS = 512,
  parameter int unsigned ADDR_W    = 6,
  parameter int unsigned DEPTH     = 8,
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [ADDR_W-1:0]    in_addr,
  input  logic [LINE_BITS-1:0] in_line,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [ADDR_W-1:0]    out_addr,
  output logic [LINE_BITS-1:0] out_line,
  output logic [PW:0]          level
);

  logic [ADDR_W-1:0]    addr_mem [DEPTH];
  logic [LINE_BITS-1:0] line_mem [DEPTH];
  logic [PW-1:0]        wp, rp;
  logic                 push, pop;

  assign in_ready  = (level != (PW+1)'(DEPTH));
  assign out_valid = (level != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_addr  = addr_mem[rp];
  assign out_line  = line_mem[rp];

  function automatic logic [PW-1:0] nxt(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (push) wp <= nxt(wp);
      if (pop)  rp <= nxt(rp);
      level <= level + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) begin
      addr_mem[wp] <= in_addr;
      line_mem[wp] <= in_line;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) level <= (PW+1)'(DEPTH));
  a_valid_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                   out_valid && !out_ready |=> out_valid);

endmodule
