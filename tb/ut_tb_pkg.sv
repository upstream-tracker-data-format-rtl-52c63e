// Reference model of the Upstream Tracker packet format for the testbenches.
//
// It builds the expected bit stream of a packet, MSB first, from the event
// description alone, written directly from the format definition and
// independent of the RTL: header-only {BXID,1,0}; normal {BXID,0,0,N} plus
// N hits {chan[7],adc[5]}; truncated {BXID,0,1,N/4}; NZS {BXID,0,1,111111},
// the 36-bit parameter block and 128 6-bit ADC values; synch = SYNC_PATTERN.
package ut_tb_pkg;
  import ut_pkg::*;

  typedef bit bitq_t[$];

  function automatic void push_bits(ref bitq_t q, input logic [31:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(v[i]);
  endfunction

  // ZS packet; trunc_full forces truncation as if the buffer were full.
  function automatic bitq_t zs_packet(input logic [3:0] bxid, input bit nodata,
                                      input int nhits, input int thr,
                                      input bit trunc_full,
                                      input logic [6:0] chans[$], input logic [4:0] adcs[$]);
    bitq_t q;
    if (nodata || nhits == 0) begin
      push_bits(q, {bxid, 2'b10}, 6);
    end else if (nhits > thr || trunc_full) begin
      push_bits(q, {bxid, 2'b01, 6'(nhits / 4)}, 12);
    end else begin
      push_bits(q, {bxid, 2'b00, 6'(nhits)}, 12);
      for (int i = 0; i < nhits; i++) push_bits(q, {chans[i], adcs[i]}, 12);
    end
    return q;
  endfunction

  function automatic bitq_t nzs_packet(input logic [3:0] bxid, input ut_nzs_info_t inf,
                                       input logic [5:0] raw[$]);
    bitq_t q;
    push_bits(q, {bxid, 2'b01, 6'h3F}, 12);
    push_bits(q, inf.num_asics, 4);
    push_bits(q, inf.num_chan_cm, 8);
    push_bits(q, inf.num_chan_signal, 8);
    push_bits(q, inf.num_chan_recover, 8);
    push_bits(q, inf.cm_value, 8);
    for (int i = 0; i < 128; i++) push_bits(q, raw[i], 6);
    return q;
  endfunction

  function automatic bitq_t sync_packet();
    bitq_t q;
    push_bits(q, 32'hA5C, 12);
    return q;
  endfunction

endpackage
