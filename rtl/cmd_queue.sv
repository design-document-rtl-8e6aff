// cmd_queue: the input command queue read by the processor.
//
// A ring buffer of DEPTH 8-bit command entries. The hardware writes a
// command at the tail index and advances the tail (register 31); the
// software reads entries and consumes them by writing the new head index
// (register 30). The queue is empty when head equals tail and full when
// tail+1 equals head; a command pushed into a full queue is dropped and
// sets the sticky overflow flag, which a head write clears (a drop in the
// same cycle as a head write leaves it set). Entries are
// read through a combinational port. The depth, the ring-buffer protocol
// and where entries are read are this design's choice.
module cmd_queue #(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     push,
  input  logic [7:0]               push_data,
  input  logic                     head_we,     // software writes the head
  input  logic [$clog2(DEPTH)-1:0] head_wdata,
  input  logic [$clog2(DEPTH)-1:0] rd_idx,
  output logic [7:0]               rd_data,
  output logic [$clog2(DEPTH)-1:0] head,
  output logic [$clog2(DEPTH)-1:0] tail,
  output logic                     overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [7:0]    mem [DEPTH];
  logic [AW-1:0] tail_next;
  logic          full;

  assign tail_next = (tail == AW'(DEPTH - 1)) ? '0 : tail + 1'b1;
  assign full      = (tail_next == head);
  assign rd_data   = mem[rd_idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      head     <= '0;
      tail     <= '0;
      overflow <= 1'b0;
    end else begin
      if (head_we) begin
        head     <= head_wdata;
        overflow <= 1'b0;
      end
      if (push) begin
        if (!full) tail <= tail_next;
        else       overflow <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk)
    if (push && !full) mem[tail] <= push_data;

endmodule
