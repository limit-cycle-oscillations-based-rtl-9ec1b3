282
281
284
281
286
282
288
282
28a
283
28d
284
28f
285
291
285
293
286
296
287
298
288
29a
289
29d
28a
29f
28b
2a1
28c
