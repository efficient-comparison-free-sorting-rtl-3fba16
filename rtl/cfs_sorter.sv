// cfs_sorter: comparison-free O(N) sorter for K-bit elements, N = 2^K.
//
// Idea: an element's value is its own address. The sort never compares two
// elements; it records which values occur and how often, then reads the
// values back in index order.
//
// Write-evaluate phase (write_ena, exactly N cycles): each cycle with
// in_valid high, the one-hot decoder turns data_in into a one-hot select.
// The selected order register records the element and the selected flag
// register is loaded with its old value plus one by the shared
// incrementor/decrementor. The parallel counter counts the N cycles;
// cycles with in_valid low record nothing, so up to N elements are sorted.
//
// Read-sort phase (read_ena): the counter value goes through the same
// decoder and selects order register and flag register i. Per cycle:
//   flag == 0            value absent: nothing stored, counter advances;
//   flag == 1            (one-detector) element shifted into the sorted
//                        array, counter advances;
//   flag >  1            (not one, decrement carry out 1) element shifted
//                        in, flag decremented, counter held.
// A value occurring m times therefore takes m cycles and an absent value
// one cycle, so the read-sort phase lasts (elements) + (absent values)
// cycles, at most 2N - 1, and a whole sort N + that many cycles plus one
// cycle for start.
//
// Interface: pulse start (in idle or done) with ascending set for the
// order wanted; the write-evaluate phase begins on the next cycle. done
// rises when the sorted array is complete and stays until the next start.
// With fewer than N elements, the cnt = sorted_count results sit at the end
// the shift fills last: sorted[N-cnt..N-1] ascending, sorted[0..cnt-1]
// descending (in descending order); the rest of the array reads 0.
//
// Follows the source design: the data path (one-hot decoder, order and
// flag register arrays, shared incrementor/decrementor, one-detector,
// parallel counter, sorted shift register with direction select) and the
// three read-sort cases. This design's choices: the start/in_valid/done
// handshake, clearing state on start, the AND-OR read buses in place of
// tri-state buffers, and FLAG_W = K+1 so that N equal elements can be
// counted (the source names a 10-bit incrementor for K = 10).
module cfs_sorter #(
  parameter int unsigned K      = 10,
  parameter int unsigned FLAG_W = K + 1,
  localparam int unsigned N     = 1 << K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         ascending,
  input  logic         in_valid,
  input  logic [K-1:0] data_in,
  output logic         write_ena,
  output logic         read_ena,
  output logic         done,
  output logic [K-1:0] sorted [N],
  output logic [K:0]   sorted_count
);

  logic              clear;
  logic [K-1:0]      pc;
  logic              pc_last, pc_inc, pc_advance;
  logic              dec_en;
  logic [K-1:0]      dec_bin;
  logic [N-1:0]      sel;
  logic [K-1:0]      or_rdata;
  logic [FLAG_W-1:0] flag, flag_next;
  logic              flag_nonzero, flag_is_one;
  logic              emit, dup;
  logic [N-1:0]      fr_we, or_we;
  logic              order_left;

  cfs_control_unit u_ctrl (
    .clk, .rst_n, .start, .pc_last, .pc_advance,
    .write_ena, .read_ena, .done, .clear
  );

  // Read-sort: hold the counter while a duplicated element is emitted.
  assign pc_advance = ~dup;
  assign pc_inc     = write_ena | (read_ena & pc_advance);

  cfs_parallel_counter #(.K(K)) u_pc (
    .clk, .rst_n, .clear, .inc(pc_inc), .count(pc), .last(pc_last)
  );

  // The decoder takes the element while writing and the counter while reading.
  assign dec_en  = write_ena ? in_valid : read_ena;
  assign dec_bin = write_ena ? data_in  : pc;

  cfs_onehot_decoder #(.K(K)) u_dec (.en(dec_en), .bin(dec_bin), .onehot(sel));

  assign or_we = write_ena ? sel : '0;

  cfs_order_reg_array #(.K(K)) u_or (
    .clk, .we_onehot(or_we), .wdata(data_in), .re_onehot(sel), .rdata(or_rdata)
  );

  cfs_one_detector #(.W(FLAG_W)) u_one (.a(flag), .is_one(flag_is_one));

  // Increment while writing, decrement while reading; the decrement's carry
  // out is 1 exactly when the flag is non-zero.
  cfs_incdec #(.W(FLAG_W)) u_incdec (
    .dec(read_ena), .a(flag), .y(flag_next), .carry_out(flag_nonzero)
  );

  assign emit = read_ena & flag_nonzero;
  assign dup  = read_ena & flag_nonzero & ~flag_is_one;

  assign fr_we = write_ena ? sel : (dup ? sel : '0);

  cfs_flag_reg_array #(.N(N), .FLAG_W(FLAG_W)) u_fr (
    .clk, .rst_n, .clear, .we_onehot(fr_we), .wdata(flag_next),
    .re_onehot(sel), .rdata(flag)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     order_left <= 1'b1;
    else if (clear) order_left <= ascending;
  end

  cfs_sorted_shift_reg #(.K(K), .N(N)) u_sr (
    .clk, .rst_n, .clear, .shift(emit), .left(order_left), .din(or_rdata),
    .q(sorted)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sorted_count <= '0;
    else if (clear) sorted_count <= '0;
    else if (emit)  sorted_count <= sorted_count + 1'b1;
  end

  // The two phases never overlap, and the decoder selects at most one register.
  a_phases_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(write_ena && read_ena));
  a_onehot_select: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(sel));
  // A present value is recorded in its own order register.
  a_order_value: assert property (@(posedge clk) disable iff (!rst_n)
    emit |-> or_rdata == pc);

endmodule
