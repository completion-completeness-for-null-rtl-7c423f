// tb_ncl_env: asynchronous four-phase environment for one bit-wise NCL stage.
//
// Every input bit has its own sender and every output bit its own receiver,
// so the stage sees the fully independent handshakes that bit-wise
// completion allows. Sender b, for wavefront w = 0..W-1: wait for Ko[b] = rfd,
// wait a random time, drive DATA vals[w][b]; wait for Ko[b] = rfn, wait a
// random time, drive NULL. Receiver k: wait for DATA on output k, store it as
// got[n][k] for its n-th wavefront, wait, drive Ki[k] = rfn; wait for NULL,
// wait, drive Ki[k] = rfd. The random waits are drawn from 0..max, with the
// maxima per input bit and phase (dmax_data, dmax_null) and per output
// (dmax_out) set by the testbench before 'start', so a testbench can make
// one channel slow and reproduce a particular race. With 'lockstep' set the
// receivers behave like one full-word next stage: Ki falls only after every
// output is DATA and rises only after every output is NULL. The run ends when every
// receiver has W wavefronts or when 'stop' is raised; 'done' then reads 1.
module tb_ncl_env
  import ncl_pkg::*;
#(
  parameter int NI = 4,
  parameter int NO = 6,
  parameter int W  = 16
) (
  input  logic          start,
  input  logic          stop,
  output dr_t  [NI-1:0] in_d,
  input  logic [NI-1:0] ko_in,
  input  dr_t  [NO-1:0] out_q,
  output logic [NO-1:0] ki_out,
  output logic          done
);

  logic [NI-1:0] vals [W];
  logic [NO-1:0] got  [W];
  int            ndone [NO];
  int            dmax_data [NI];
  int            dmax_null [NI];
  int            dmax_out  [NO];
  int            errors;     // wrong output bits, filled in by check()
  bit            lockstep;   // receivers acknowledge only whole words

  logic all_data, all_null;
  always_comb begin
    all_data = 1'b1;
    all_null = 1'b1;
    for (int k = 0; k < NO; k++) begin
      if (!(out_q[k].r1 ^ out_q[k].r0)) all_data = 1'b0;
      if (out_q[k].r1 | out_q[k].r0)    all_null = 1'b0;
    end
  end

  // Count delivered output bits that differ from ref_vals (the testbench's
  // expected outputs per wavefront); undelivered wavefronts are not counted.
  function automatic int check(input logic [NO-1:0] ref_vals [W]);
    int e = 0;
    for (int k = 0; k < NO; k++)
      for (int w = 0; w < ndone[k]; w++)
        if (got[w][k] != ref_vals[w][k]) e++;
    return e;
  endfunction

  initial begin
    in_d   = '0;
    ki_out = '1;
    foreach (ndone[k]) ndone[k] = 0;
    foreach (got[w]) got[w] = '0;
    foreach (dmax_data[b]) begin dmax_data[b] = 3; dmax_null[b] = 3; end
    foreach (dmax_out[k]) dmax_out[k] = 3;
    lockstep = 1'b0;
    errors = 0;
  end

  always_comb begin
    done = 1'b1;
    for (int k = 0; k < NO; k++) if (ndone[k] < W) done = 1'b0;
  end

  task automatic rwait(input int mx);
    int d;
    d = $urandom_range(0, mx);
    if (d > 0) #(d);
    else #0;
  endtask

  task automatic sender(input int b);
    for (int w = 0; w < W && !stop; w++) begin
      wait (ko_in[b] == RFD || stop);
      rwait(dmax_data[b]);
      in_d[b] = dr_data(vals[w][b]);
      wait (ko_in[b] == RFN || stop);
      rwait(dmax_null[b]);
      in_d[b] = DR_NULL;
    end
  endtask

  task automatic receiver(input int k);
    while (ndone[k] < W && !stop) begin
      wait ((out_q[k].r1 ^ out_q[k].r0) || stop);
      if (stop) break;
      got[ndone[k]][k] = out_q[k].r1;
      ndone[k]++;
      if (lockstep) wait (all_data || stop);
      rwait(dmax_out[k]);
      ki_out[k] = RFN;
      wait (!(out_q[k].r1 | out_q[k].r0) || stop);
      if (lockstep) wait (all_null || stop);
      rwait(dmax_out[k]);
      ki_out[k] = RFD;
    end
  endtask

  for (genvar b = 0; b < NI; b++) begin : g_send
    initial begin
      wait (start);
      sender(b);
    end
  end

  for (genvar k = 0; k < NO; k++) begin : g_recv
    initial begin
      wait (start);
      receiver(k);
    end
  end

endmodule
